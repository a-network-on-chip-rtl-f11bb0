// router_monitor_tb: self-checking test of a complete router-link monitor.
// Programs the shared filter for Best-Effort body and end-of-packet words
// in flit word 0 or 1, with trigger after TRIG_N matches; sends random
// packets of whole 3-word flits with random idle cycles, QoS and EOM; keeps
// a reference match count and CRC-32 over the matching words; checks that
// the trigger request rises at the second rising edge after the link word that
// reaches TRIG_N (one cycle of link registering, one of counting) and is
// released by the acknowledge; reads every status word back.
module router_monitor_tb;
  import mon_pkg::*;
  localparam int TRIG_N = 50;
  logic clk = 0, rst_n = 0;
  logic link_valid = 0, link_eop = 0, link_eom = 0, link_gt = 0;
  logic [31:0] link_data = 0;
  logic [7:0] dbg_addr = 0;
  logic dbg_wr = 0, dbg_rd = 0, dbg_trigger_ack = 0, dbg_trigger_req;
  logic [31:0] dbg_wdata = 0, dbg_rdata;
  int checks = 0, failures = 0, n_match = 0, reach_cycle = -1, req_cycle = -1, cycle = 0;
  logic [31:0] r_crc = CRC_INIT;

  router_monitor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && dbg_trigger_req && req_cycle < 0) req_cycle = cycle;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] crc_ref(input logic [31:0] c, input logic [31:0] x);
    for (int b = 31; b >= 0; b--) begin
      logic fb;
      fb = c[31] ^ x[b];
      c = c << 1;
      if (fb) c ^= 32'h04C11DB7;
    end
    return c;
  endfunction

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); dbg_addr = a; dbg_wdata = d; dbg_wr = 1;
    @(negedge clk); dbg_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); dbg_addr = a; dbg_rd = 1;
    @(negedge clk); dbg_rd = 0; d = dbg_rdata;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int flits, n_words;
    bit gt;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // en, pos = body|end, qos = BE, eom = any, words 0 and 1
    wr(8'(RT_CFG_FILT), 32'h0000_03DD);
    wr(8'(RT_CFG_TRIG), TRIG_N);
    n_words = 0;
    for (int pkt = 0; pkt < 200; pkt++) begin
      flits = $urandom_range(1, 3);
      gt = 1'($urandom_range(0, 1));
      for (int k = 0; k < flits * 3; ) begin
        @(negedge clk);
        dbg_trigger_ack = dbg_trigger_req;
        if ($urandom_range(0, 4) == 0) link_valid = 0;
        else begin
          link_valid = 1; link_data = $urandom; link_gt = gt;
          link_eop = (k == flits * 3 - 1); link_eom = link_eop && $urandom_range(0, 1);
          if (k != 0 && !gt && (k % 3) < 2) begin
            n_match++;
            r_crc = crc_ref(r_crc, link_data);
            if (n_match == TRIG_N) reach_cycle = cycle;
          end
          k++;
          n_words++;
        end
      end
    end
    @(negedge clk); link_valid = 0;
    dbg_trigger_ack = 0;
    repeat (3) @(negedge clk);
    // sampled at the edge after it rose
    check(req_cycle - reach_cycle == 3, $sformatf("trigger latency %0d cycles", req_cycle - reach_cycle));
    rd(STAT_BASE + 8'(RT_ST_BW_USED), d);  check(d == 32'(n_match), $sformatf("bw used %0d exp %0d", d, n_match));
    rd(STAT_BASE + 8'(RT_ST_TRIG_CNT), d); check(d == 32'(n_match), "trigger count");
    rd(STAT_BASE + 8'(RT_ST_CRC), d);      check(d == r_crc, "crc");
    rd(STAT_BASE + 8'(RT_ST_BW_TOTAL), d); check(d > 32'(n_words), "total cycles");
    rd(STAT_BASE + 8'(RT_ST_FLAGS), d);    check(d[1:0] == 2'b10, "fired after acknowledge");
    wr(CMD_ADDR, 32'h0F);
    rd(STAT_BASE + 8'(RT_ST_BW_USED), d);  check(d == 0, "bandwidth cleared");
    rd(STAT_BASE + 8'(RT_ST_FLAGS), d);    check(d[1:0] == 2'b00, "trigger re-armed");
    $display("matching words %0d of %0d", n_match, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

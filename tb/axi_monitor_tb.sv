// axi_monitor_tb: self-checking test of a complete AXI bus monitor.
// Programs the monitor through its debug register port:
//   filter A (trigger + CRC): both directions, address 0x1000..0x1FFF, data
//            low byte 2; trigger after TRIG_N matching beats;
//   filter B (latency): reads with ID 1 only; interrupt above 40 cycles;
//   filter C (bandwidth): disabled, i.e. every data beat counts.
// Then runs random AXI traffic and keeps its own reference of every
// measurement from the generator's beat addresses and latencies. Checks the
// trigger request timing and acknowledge, the latency interrupt, and all
// status words read back through the debug port, then the clear command.
// A second instance built with only the bandwidth function runs alongside.
module axi_monitor_tb;
  import mon_pkg::*;
  localparam int DW = 64, IW = 4, TRIG_N = 60;
  logic clk = 0, rst_n = 0, en = 0;
  int max_out = 8;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready, wlast, rlast;
  logic [IW-1:0] awid, bid, arid, rid;
  logic [31:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst;
  logic [DW-1:0] wdata, rdata;
  logic [31:0] exp_wd_addr, exp_rd_addr, exp_wc_addr, exp_rc_addr;
  logic [IW-1:0] exp_wd_id;
  int exp_wc_lat, exp_rc_lat, outstanding;
  logic [7:0] dbg_addr = 0;
  logic dbg_wr = 0, dbg_rd = 0, dbg_trigger_ack = 0, dbg_trigger_req, latency_interrupt;
  logic [31:0] dbg_wdata = 0, dbg_rdata;
  int checks = 0, failures = 0;
  // reference model
  bit counting = 0;
  longint r_trig = 0, r_bw = 0, r_lat_sum = 0, r_lat_cnt = 0, r_lat_max = 0, r_lat_last = 0;
  bit r_irq = 0, r_req = 0, r_fired = 0;
  logic [31:0] r_crc = CRC_INIT;
  int req_rise_ok = 0, acks = 0;

  axi_traffic_gen #(.DATA_W(DW), .ID_W(IW)) gen (.*);
  axi_monitor #(.DATA_W(DW), .ID_W(IW)) dut (.*);

  // a second instance built with the bandwidth function only
  logic [31:0] min_rdata;
  logic        min_req, min_irq;
  int          min_req_seen = 0;
  axi_monitor #(.DATA_W(DW), .ID_W(IW), .HAS_TRIGGER(1'b0), .HAS_CRC(1'b0), .HAS_LATENCY(1'b0)) dut_min (
    .clk, .rst_n, .awvalid, .awready, .awid, .awaddr, .awlen, .awsize, .awburst,
    .wvalid, .wready, .wdata, .wlast, .bvalid, .bready, .bid,
    .arvalid, .arready, .arid, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rid, .rdata, .rlast,
    .dbg_addr, .dbg_wr, .dbg_rd, .dbg_wdata, .dbg_rdata(min_rdata),
    .dbg_trigger_req(min_req), .dbg_trigger_ack(1'b0), .latency_interrupt(min_irq));
  always @(posedge clk) if (rst_n && (min_req || min_irq)) min_req_seen++;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] crc_ref(input logic [31:0] c, input logic [95:0] x);
    for (int b = 95; b >= 0; b--) begin
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

  // reference of what the edge ahead does, evaluated just before it
  always begin
    @(negedge clk); #4;
    if (counting) begin
      bit ma_w, ma_r, mb_r;
      int nm;
      ma_w = wvalid && wready && exp_wd_addr >= 32'h1000 && exp_wd_addr <= 32'h1FFF && wdata[7:0] == 8'd2;
      ma_r = rvalid && rready && exp_rd_addr >= 32'h1000 && exp_rd_addr <= 32'h1FFF && rdata[7:0] == 8'd2;
      mb_r = rvalid && rready && rlast && rid == 4'd1;
      nm = int'(ma_w) + int'(ma_r);
      if (ma_w) r_crc = crc_ref(r_crc, {exp_wd_addr, wdata});
      if (ma_r) r_crc = crc_ref(r_crc, {exp_rd_addr, rdata});
      if ((wvalid && wready) || (rvalid && rready)) r_bw++;
      if (mb_r) begin
        r_lat_last = exp_rc_lat; r_lat_sum += exp_rc_lat; r_lat_cnt++;
        if (exp_rc_lat > r_lat_max) r_lat_max = exp_rc_lat;
        if (exp_rc_lat > 40) r_irq = 1;
      end
      // trigger: the request must rise right after the edge that reaches TRIG_N
      if (r_req) begin
        if (dbg_trigger_ack) begin r_req = 0; r_fired = 1; end
      end else if (!r_fired && r_trig + nm >= TRIG_N) r_req = 1;
      r_trig += nm;
      @(posedge clk); #1;
      check(dbg_trigger_req == r_req, $sformatf("trigger request %0b exp %0b", dbg_trigger_req, r_req));
      check(latency_interrupt == r_irq, "latency interrupt");
    end
  end

  // acknowledge a trigger request a few cycles after it rises
  always @(negedge clk) begin
    if (dbg_trigger_req && !dbg_trigger_ack && $urandom_range(0, 3) == 0) begin dbg_trigger_ack <= 1; acks++; end
    else dbg_trigger_ack <= 0;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // filter A
    wr(8'(AXI_FILT_A + FO_CTRL), 32'b1101);
    wr(8'(AXI_FILT_A + FO_ADDR_LO), 32'h1000);
    wr(8'(AXI_FILT_A + FO_ADDR_HI), 32'h1FFF);
    wr(8'(AXI_FILT_A + FO_REF_LO), 32'h2);
    wr(8'(AXI_FILT_A + FO_MASK_LO), 32'hFF);
    // filter B: reads, id 1
    wr(8'(AXI_FILT_B + FO_CTRL), 32'h0000_010B);
    wr(8'(AXI_FILT_B + FO_ADDR_HI), 32'hFFFF_FFFF);
    wr(8'(AXI_CFG_TRIG_VAL), TRIG_N);
    wr(8'(AXI_CFG_LAT_MAX), 32'd40);
    rd(8'(AXI_FILT_A + FO_ADDR_HI), d); check(d == 32'h1FFF, "config readback");
    @(negedge clk); dbg_addr = CMD_ADDR; dbg_wdata = 32'h1F; dbg_wr = 1;
    @(negedge clk); dbg_wr = 0; counting = 1; en = 1;
    repeat (6000) @(negedge clk);
    en = 0;
    while (outstanding != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    counting = 0;
    rd(STAT_BASE + 8'(AXI_ST_TRIG_CNT), d); check(d == 32'(r_trig), $sformatf("trigger count %0d exp %0d", d, r_trig));
    rd(STAT_BASE + 8'(AXI_ST_CRC), d);      check(d == r_crc, $sformatf("crc %h exp %h", d, r_crc));
    rd(STAT_BASE + 8'(AXI_ST_BW_USED), d);  check(d == 32'(r_bw), $sformatf("bw used %0d exp %0d", d, r_bw));
    rd(STAT_BASE + 8'(AXI_ST_BW_TOTAL), d); check(d > 32'(r_bw) && d > 6000, "bw total");
    rd(STAT_BASE + 8'(AXI_ST_LAT_LAST), d); check(d == 32'(r_lat_last), "latency last");
    rd(STAT_BASE + 8'(AXI_ST_LAT_MAX), d);  check(d == 32'(r_lat_max), $sformatf("latency max %0d exp %0d", d, r_lat_max));
    rd(STAT_BASE + 8'(AXI_ST_LAT_SUM), d);  check(d == 32'(r_lat_sum), "latency sum");
    rd(STAT_BASE + 8'(AXI_ST_LAT_CNT), d);  check(d == 32'(r_lat_cnt) && r_lat_cnt > 20, $sformatf("latency count %0d exp %0d", d, r_lat_cnt));
    rd(STAT_BASE + 8'(AXI_ST_FLAGS), d);    check(d[1] == r_fired && d[3] == r_irq && !d[2], "flags");
    check(r_fired && r_irq && acks == 1, "trigger fired and was acknowledged once; interrupt raised");
    // the bandwidth-only instance: same bandwidth, the other functions absent
    rd(STAT_BASE + 8'(AXI_ST_BW_USED), d);  check(min_rdata == 32'(r_bw), "bandwidth-only instance: bw used");
    rd(STAT_BASE + 8'(AXI_ST_TRIG_CNT), d); check(min_rdata == 0, "bandwidth-only instance: no trigger count");
    rd(STAT_BASE + 8'(AXI_ST_LAT_CNT), d);  check(min_rdata == 0, "bandwidth-only instance: no latency count");
    check(min_req_seen == 0, "bandwidth-only instance: no trigger request or interrupt");
    // clear everything
    wr(CMD_ADDR, 32'h1F);
    rd(STAT_BASE + 8'(AXI_ST_LAT_CNT), d);  check(d == 0, "latency cleared");
    rd(STAT_BASE + 8'(AXI_ST_TRIG_CNT), d); check(d == 0, "trigger cleared");
    rd(STAT_BASE + 8'(AXI_ST_CRC), d);      check(d == CRC_INIT, "crc cleared");
    rd(STAT_BASE + 8'(AXI_ST_FLAGS), d);    check(d[3:0] == 0, "flags cleared");
    $display("trigger matches %0d, latency samples %0d, busy cycles %0d", r_trig, r_lat_cnt, r_bw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

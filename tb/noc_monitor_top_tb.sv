// noc_monitor_top_tb: end-to-end test of the monitoring infrastructure at
// its default sizes (64-bit and 32-bit AXI monitors with 8 pending
// transactions and 4-bit IDs, router monitor on a 32-bit link with 3-word
// flits).
// Two AXI traffic generators and a NoC packet source drive the monitored
// links while the testbench programs all three monitors through the one
// shared debug port, keeps its own reference of every measurement, and
// reads the status words back. Each mechanism is counted and must occur:
// filter matches and rejections, all three AXI burst types, interleaved
// read data, each monitor's trigger request and acknowledge, both latency
// interrupts, pending-table overflow, and the clear commands.
module noc_monitor_top_tb;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] dbg_sel = 0;
  logic [7:0] dbg_addr = 0;
  logic dbg_wr = 0, dbg_rd = 0;
  logic [31:0] dbg_wdata = 0, dbg_rdata;
  logic [2:0] dbg_trigger_req, dbg_trigger_ack = 0;
  logic [1:0] latency_interrupt;
  int checks = 0, failures = 0;

  // ------------------------------------------------------------ 64-bit link
  logic en64 = 0; int max64 = 8;
  logic m64_awvalid, m64_awready, m64_wvalid, m64_wready, m64_bvalid, m64_bready;
  logic m64_arvalid, m64_arready, m64_rvalid, m64_rready, m64_wlast, m64_rlast;
  logic [3:0] m64_awid, m64_bid, m64_arid, m64_rid, x64_wd_id;
  logic [31:0] m64_awaddr, m64_araddr, x64_wd_addr, x64_rd_addr, x64_wc_addr, x64_rc_addr;
  logic [7:0] m64_awlen, m64_arlen;
  logic [2:0] m64_awsize, m64_arsize;
  logic [1:0] m64_awburst, m64_arburst;
  logic [63:0] m64_wdata, m64_rdata;
  int x64_wc_lat, x64_rc_lat, out64;
  axi_traffic_gen #(.DATA_W(64)) gen64 (
    .clk, .rst_n, .en(en64), .max_out(max64),
    .awvalid(m64_awvalid), .awready(m64_awready), .awid(m64_awid), .awaddr(m64_awaddr), .awlen(m64_awlen),
    .awsize(m64_awsize), .awburst(m64_awburst), .wvalid(m64_wvalid), .wready(m64_wready), .wdata(m64_wdata),
    .wlast(m64_wlast), .bvalid(m64_bvalid), .bready(m64_bready), .bid(m64_bid),
    .arvalid(m64_arvalid), .arready(m64_arready), .arid(m64_arid), .araddr(m64_araddr), .arlen(m64_arlen),
    .arsize(m64_arsize), .arburst(m64_arburst), .rvalid(m64_rvalid), .rready(m64_rready), .rid(m64_rid),
    .rdata(m64_rdata), .rlast(m64_rlast),
    .exp_wd_addr(x64_wd_addr), .exp_wd_id(x64_wd_id), .exp_rd_addr(x64_rd_addr), .exp_wc_addr(x64_wc_addr),
    .exp_wc_lat(x64_wc_lat), .exp_rc_addr(x64_rc_addr), .exp_rc_lat(x64_rc_lat), .outstanding(out64));

  // ------------------------------------------------------------ 32-bit link
  logic en32 = 0; int max32 = 8;
  logic m32_awvalid, m32_awready, m32_wvalid, m32_wready, m32_bvalid, m32_bready;
  logic m32_arvalid, m32_arready, m32_rvalid, m32_rready, m32_wlast, m32_rlast;
  logic [3:0] m32_awid, m32_bid, m32_arid, m32_rid, x32_wd_id;
  logic [31:0] m32_awaddr, m32_araddr, x32_wd_addr, x32_rd_addr, x32_wc_addr, x32_rc_addr;
  logic [7:0] m32_awlen, m32_arlen;
  logic [2:0] m32_awsize, m32_arsize;
  logic [1:0] m32_awburst, m32_arburst;
  logic [31:0] m32_wdata, m32_rdata;
  int x32_wc_lat, x32_rc_lat, out32;
  axi_traffic_gen #(.DATA_W(32)) gen32 (
    .clk, .rst_n, .en(en32), .max_out(max32),
    .awvalid(m32_awvalid), .awready(m32_awready), .awid(m32_awid), .awaddr(m32_awaddr), .awlen(m32_awlen),
    .awsize(m32_awsize), .awburst(m32_awburst), .wvalid(m32_wvalid), .wready(m32_wready), .wdata(m32_wdata),
    .wlast(m32_wlast), .bvalid(m32_bvalid), .bready(m32_bready), .bid(m32_bid),
    .arvalid(m32_arvalid), .arready(m32_arready), .arid(m32_arid), .araddr(m32_araddr), .arlen(m32_arlen),
    .arsize(m32_arsize), .arburst(m32_arburst), .rvalid(m32_rvalid), .rready(m32_rready), .rid(m32_rid),
    .rdata(m32_rdata), .rlast(m32_rlast),
    .exp_wd_addr(x32_wd_addr), .exp_wd_id(x32_wd_id), .exp_rd_addr(x32_rd_addr), .exp_wc_addr(x32_wc_addr),
    .exp_wc_lat(x32_wc_lat), .exp_rc_addr(x32_rc_addr), .exp_rc_lat(x32_rc_lat), .outstanding(out32));

  // ------------------------------------------------------------ router link
  logic rl_valid = 0, rl_eop = 0, rl_eom = 0, rl_gt = 0, rl_en = 0;
  logic [31:0] rl_data = 0;

  noc_monitor_top dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ mechanisms
  int n_wrap = 0, n_fixed = 0, n_incr = 0, n_interleave = 0, n_rejA = 0, n_ovf = 0, n_clear = 0;
  int n_req[3] = '{0, 0, 0}, n_ack[3] = '{0, 0, 0}, n_irq[2] = '{0, 0};
  logic [3:0] last_rid = 0; bit mid_burst = 0;

  always @(posedge clk) if (rst_n) begin
    if (m64_arvalid && m64_arready) case (m64_arburst) 2'd0: n_fixed++; 2'd1: n_incr++; default: n_wrap++; endcase
    if (m64_rvalid && m64_rready) begin
      if (mid_burst && m64_rid != last_rid) n_interleave++;
      mid_burst = !m64_rlast; last_rid = m64_rid;
    end
    for (int m = 0; m < 3; m++) if (dbg_trigger_req[m] && dbg_trigger_ack[m]) n_ack[m]++;
  end
  logic [2:0] req_q = 0; logic [1:0] irq_q = 0;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < 3; m++) if (dbg_trigger_req[m] && !req_q[m]) n_req[m]++;
    for (int m = 0; m < 2; m++) if (latency_interrupt[m] && !irq_q[m]) n_irq[m]++;
    req_q <= dbg_trigger_req; irq_q <= latency_interrupt;
  end
  // acknowledge each trigger request one cycle after it is seen
  always @(negedge clk) dbg_trigger_ack <= dbg_trigger_req & ~dbg_trigger_ack;

  // ------------------------------------------------------------ references
  function automatic logic [31:0] crc_ref(input logic [31:0] c, input logic [95:0] x, input int n);
    for (int b = n - 1; b >= 0; b--) begin
      logic fb;
      fb = c[31] ^ x[b];
      c = c << 1;
      if (fb) c ^= 32'h04C11DB7;
    end
    return c;
  endfunction

  bit counting = 0;
  // 64-bit: A = both directions, 0x1000..0x1FFF; B = writes; C = reads
  longint a64 = 0, bw64 = 0, ls64 = 0, lc64 = 0, lm64 = 0;
  logic [31:0] crc64 = CRC_INIT;
  // 32-bit: A = pass all; B = pass all; C = writes with ID 2
  longint a32 = 0, bw32 = 0, ls32 = 0, lc32 = 0, lm32 = 0;
  logic [31:0] crc32 = CRC_INIT;
  // router: GT header words
  longint art = 0;
  logic [31:0] crcrt = CRC_INIT;

  always begin
    @(negedge clk); #4;
    if (counting) begin
      bit w, r;
      w = m64_wvalid && m64_wready && x64_wd_addr inside {[32'h1000:32'h1FFF]};
      r = m64_rvalid && m64_rready && x64_rd_addr inside {[32'h1000:32'h1FFF]};
      if (m64_wvalid && m64_wready && !w) n_rejA++;
      if (w) begin a64++; crc64 = crc_ref(crc64, {x64_wd_addr, m64_wdata}, 96); end
      if (r) begin a64++; crc64 = crc_ref(crc64, {x64_rd_addr, m64_rdata}, 96); end
      if (m64_rvalid && m64_rready) bw64++;
      if (m64_bvalid && m64_bready) begin
        ls64 += x64_wc_lat; lc64++; if (x64_wc_lat > lm64) lm64 = x64_wc_lat;
      end
      if (m32_wvalid && m32_wready) begin a32++; crc32 = crc_ref(crc32, {32'd0, x32_wd_addr, m32_wdata}, 64); end
      if (m32_rvalid && m32_rready) begin a32++; crc32 = crc_ref(crc32, {32'd0, x32_rd_addr, m32_rdata}, 64); end
      if (m32_wvalid && m32_wready && x32_wd_id == 4'd2) bw32++;
      if (m32_bvalid && m32_bready) begin
        ls32 += x32_wc_lat; lc32++; if (x32_wc_lat > lm32) lm32 = x32_wc_lat;
      end
      if (m32_rvalid && m32_rready && m32_rlast) begin
        ls32 += x32_rc_lat; lc32++; if (x32_rc_lat > lm32) lm32 = x32_rc_lat;
      end
    end
  end

  // NoC packet source: whole 3-word flits, random gaps, QoS per packet
  initial begin
    int flits; bit gt;
    @(posedge rst_n);
    forever begin
      flits = $urandom_range(1, 3); gt = 1'($urandom_range(0, 1));
      for (int k = 0; k < flits * 3; ) begin
        @(negedge clk);
        if (!rl_en || $urandom_range(0, 3) == 0) rl_valid = 0;
        else begin
          rl_valid = 1; rl_data = $urandom; rl_gt = gt; rl_eop = (k == flits * 3 - 1); rl_eom = rl_eop;
          if (counting && k == 0 && gt) begin art++; crcrt = crc_ref(crcrt, {64'd0, rl_data}, 32); end
          k++;
        end
      end
    end
  end

  // ------------------------------------------------------------ debug port
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [1:0] s, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); dbg_sel = s; dbg_addr = a; dbg_wdata = d; dbg_wr = 1;
    @(negedge clk); dbg_wr = 0;
  endtask

  task automatic rd(input logic [1:0] s, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); dbg_sel = s; dbg_addr = a; dbg_rd = 1;
    @(negedge clk); dbg_rd = 0; d = dbg_rdata;
  endtask

  function automatic logic [7:0] st(input int unsigned i);
    return STAT_BASE + 8'(i);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 64-bit monitor
    wr(0, 8'(AXI_FILT_A + FO_CTRL), 32'b1101);
    wr(0, 8'(AXI_FILT_A + FO_ADDR_LO), 32'h1000);
    wr(0, 8'(AXI_FILT_A + FO_ADDR_HI), 32'h1FFF);
    wr(0, 8'(AXI_FILT_B + FO_CTRL), 32'b0101);
    wr(0, 8'(AXI_FILT_B + FO_ADDR_HI), 32'hFFFF_FFFF);
    wr(0, 8'(AXI_FILT_C + FO_CTRL), 32'b1001);
    wr(0, 8'(AXI_FILT_C + FO_ADDR_HI), 32'hFFFF_FFFF);
    wr(0, 8'(AXI_CFG_TRIG_VAL), 32'd30);
    wr(0, 8'(AXI_CFG_LAT_MAX), 32'd30);
    // 32-bit monitor
    wr(1, 8'(AXI_FILT_C + FO_CTRL), 32'h0000_0207);
    wr(1, 8'(AXI_FILT_C + FO_ADDR_HI), 32'hFFFF_FFFF);
    wr(1, 8'(AXI_CFG_TRIG_VAL), 32'd100);
    wr(1, 8'(AXI_CFG_LAT_MAX), 32'd50);
    // router monitor: GT headers, any EOM, any word
    wr(2, 8'(RT_CFG_FILT), 32'h0000_07E3);
    wr(2, 8'(RT_CFG_TRIG), 32'd10);
    rd(0, 8'(AXI_CFG_TRIG_VAL), d); check(d == 30, "64-bit monitor config readback");
    rd(1, 8'(AXI_CFG_TRIG_VAL), d); check(d == 100, "32-bit monitor config readback");
    rd(2, 8'(RT_CFG_TRIG), d);      check(d == 10, "router monitor config readback");
    // clear all three monitors while the links are idle, then start traffic
    for (int s = 0; s < 3; s++) wr(2'(s), CMD_ADDR, 32'h1F);
    counting = 1; en64 = 1; en32 = 1; rl_en = 1;
    repeat (5000) @(negedge clk);
    en64 = 0; en32 = 0; rl_en = 0;
    while (out64 != 0 || out32 != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    counting = 0;
    // 64-bit monitor
    rd(0, st(AXI_ST_TRIG_CNT), d); check(d == 32'(a64), $sformatf("64: filter A count %0d exp %0d", d, a64));
    rd(0, st(AXI_ST_CRC), d);      check(d == crc64, "64: crc");
    rd(0, st(AXI_ST_BW_USED), d);  check(d == 32'(bw64), $sformatf("64: read busy cycles %0d exp %0d", d, bw64));
    rd(0, st(AXI_ST_LAT_SUM), d);  check(d == 32'(ls64), "64: write latency sum");
    rd(0, st(AXI_ST_LAT_CNT), d);  check(d == 32'(lc64), "64: write latency count");
    rd(0, st(AXI_ST_LAT_MAX), d);  check(d == 32'(lm64), "64: write latency max");
    rd(0, st(AXI_ST_FLAGS), d);    check(d[1] && d[3] && !d[2], "64: fired, interrupt, no overflow");
    // 32-bit monitor
    rd(1, st(AXI_ST_TRIG_CNT), d); check(d == 32'(a32), $sformatf("32: beats %0d exp %0d", d, a32));
    rd(1, st(AXI_ST_CRC), d);      check(d == crc32, "32: crc");
    rd(1, st(AXI_ST_BW_USED), d);  check(d == 32'(bw32), $sformatf("32: ID 2 write cycles %0d exp %0d", d, bw32));
    rd(1, st(AXI_ST_LAT_SUM), d);  check(d == 32'(ls32), "32: latency sum");
    rd(1, st(AXI_ST_LAT_CNT), d);  check(d == 32'(lc32), "32: latency count");
    rd(1, st(AXI_ST_LAT_MAX), d);  check(d == 32'(lm32), "32: latency max");
    rd(1, st(AXI_ST_FLAGS), d);    check(d[1] && d[3], "32: fired and interrupt");
    // router monitor
    rd(2, st(RT_ST_TRIG_CNT), d);  check(d == 32'(art), $sformatf("router: GT headers %0d exp %0d", d, art));
    rd(2, st(RT_ST_BW_USED), d);   check(d == 32'(art), "router: busy cycles");
    rd(2, st(RT_ST_CRC), d);       check(d == crcrt, "router: crc");
    rd(2, st(RT_ST_FLAGS), d);     check(d[1], "router: fired");
    // overflow of the 64-bit monitor's pending tables
    max64 = 12; en64 = 1;
    repeat (2000) @(negedge clk);
    en64 = 0;
    while (out64 != 0) @(negedge clk);
    rd(0, st(AXI_ST_FLAGS), d);    if (d[2]) n_ovf++;
    check(d[2], "64: overflow flag with 12 outstanding");
    // clear commands
    for (int s = 0; s < 3; s++) wr(2'(s), CMD_ADDR, 32'h1F);
    rd(0, st(AXI_ST_FLAGS), d); check(d[3:0] == 0, "64: flags cleared"); if (d[3:0] == 0) n_clear++;
    rd(1, st(AXI_ST_LAT_CNT), d); check(d == 0, "32: latency cleared"); if (d == 0) n_clear++;
    rd(2, st(RT_ST_CRC), d); check(d == CRC_INIT, "router: crc cleared"); if (d == CRC_INIT) n_clear++;
    check(latency_interrupt == 0 && dbg_trigger_req == 0, "outputs idle after clear");
    // every mechanism happened
    check(n_wrap > 0 && n_fixed > 0 && n_incr > 0, "all burst types");
    check(n_interleave > 0, "interleaved read data");
    check(n_rejA > 0, "filter rejected beats");
    for (int m = 0; m < 3; m++) check(n_req[m] == 1 && n_ack[m] == 1, $sformatf("monitor %0d trigger request and acknowledge", m));
    for (int m = 0; m < 2; m++) check(n_irq[m] == 1, $sformatf("monitor %0d latency interrupt", m));
    check(n_ovf == 1 && n_clear == 3, "overflow and clears");
    $display("bursts fixed %0d incr %0d wrap %0d, interleaved %0d, rejected %0d, triggers %0d/%0d/%0d, interrupts %0d/%0d, overflow %0d",
             n_fixed, n_incr, n_wrap, n_interleave, n_rejA, n_req[0], n_req[1], n_req[2], n_irq[0], n_irq[1], n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// axi_psfe_tb: self-checking test of the AXI front end.
// Random AXI4 traffic from axi_traffic_gen (up to 8 outstanding per
// direction, interleaved reads, out-of-order responses, all burst types);
// every cycle the data events (beat address, ID) and completion events
// (start address, latency) are compared with the generator's reference.
// A final phase allows 12 outstanding transactions to check that the
// overflow flag is raised and that the clear command drops it.
module axi_psfe_tb;
  localparam int DW = 64, IW = 4;
  logic clk = 0, rst_n = 0, en = 0, clr_ovf = 0;
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
  logic wd_v, rd_v, wc_v, rc_v, ovf;
  logic [31:0] wd_addr, rd_addr, wc_addr, rc_addr, wc_lat, rc_lat;
  logic [DW-1:0] wd_data, rd_data;
  logic [IW-1:0] wd_id, rd_id, wc_id, rc_id;
  int checks = 0, failures = 0;
  int n_wbeat = 0, n_rbeat = 0, n_wcmp = 0, n_rcmp = 0, n_wrap = 0, n_fixed = 0;

  axi_traffic_gen #(.DATA_W(DW), .ID_W(IW)) gen (.*);
  axi_psfe #(.DATA_W(DW), .ID_W(IW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (arvalid && arready && arburst == 2'd2) n_wrap++;
    if (arvalid && arready && arburst == 2'd0) n_fixed++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; en = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk); #4;
      if (cyc == 5000) en = 0;
      check(wd_v == (wvalid && wready) && rd_v == (rvalid && rready), "data event valid");
      check(wc_v == (bvalid && bready) && rc_v == (rvalid && rready && rlast), "completion valid");
      if (wd_v) begin
        n_wbeat++;
        check(wd_addr == exp_wd_addr && wd_id == exp_wd_id && wd_data == wdata,
              $sformatf("cyc %0d W beat addr %h exp %h id %0d exp %0d", cyc, wd_addr, exp_wd_addr, wd_id, exp_wd_id));
      end
      if (rd_v) begin
        n_rbeat++;
        check(rd_addr == exp_rd_addr && rd_id == rid && rd_data == rdata,
              $sformatf("cyc %0d R beat addr %h exp %h", cyc, rd_addr, exp_rd_addr));
      end
      if (wc_v) begin
        n_wcmp++;
        check(wc_addr == exp_wc_addr && wc_lat == 32'(exp_wc_lat) && wc_id == bid,
              $sformatf("cyc %0d B addr %h/%h lat %0d/%0d", cyc, wc_addr, exp_wc_addr, wc_lat, exp_wc_lat));
      end
      if (rc_v) begin
        n_rcmp++;
        check(rc_addr == exp_rc_addr && rc_lat == 32'(exp_rc_lat) && rc_id == rid,
              $sformatf("cyc %0d R last addr %h/%h lat %0d/%0d", cyc, rc_addr, exp_rc_addr, rc_lat, exp_rc_lat));
      end
    end
    check(outstanding == 0, "traffic drained");
    check(!ovf, "no overflow at 8 outstanding");
    check(n_wcmp > 100 && n_rcmp > 100 && n_wrap > 10 && n_fixed > 10, "enough traffic of every kind");
    // overflow phase
    max_out = 12; en = 1;
    repeat (3000) @(negedge clk);
    en = 0;
    repeat (1500) @(negedge clk);
    check(ovf, "overflow flag with 12 outstanding");
    clr_ovf = 1; @(negedge clk); clr_ovf = 0; @(negedge clk);
    check(!ovf, "overflow flag cleared");
    $display("beats W %0d R %0d, completions W %0d R %0d", n_wbeat, n_rbeat, n_wcmp, n_rcmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

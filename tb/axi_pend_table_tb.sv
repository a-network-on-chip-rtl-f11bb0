// axi_pend_table_tb: self-checking test of the pending-transaction store.
// A read table and a write table are fed from axi_traffic_gen. Checks per
// cycle: the beat address and entry ID of every data beat, the start
// address and issue time of every completion, and the `full` output
// against the generator's count of outstanding transactions. A directed
// part then checks the WRAP rule on one 4-beat read (0x38, 0x20, 0x28, 0x30
// for 8-byte beats starting at 0x38).
module axi_pend_table_tb;
  localparam int IW = 4;
  logic clk = 0, rst_n = 0, en = 0;
  int max_out = 8;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready, wlast, rlast;
  logic [IW-1:0] awid, bid, arid, rid;
  logic [31:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst;
  logic [63:0] wdata, rdata;
  logic [31:0] exp_wd_addr, exp_rd_addr, exp_wc_addr, exp_rc_addr;
  logic [IW-1:0] exp_wd_id;
  int exp_wc_lat, exp_rc_lat, outstanding;
  logic [31:0] now = 0;
  int checks = 0, failures = 0, n_full = 0, n_rbeats = 0, n_wbeats = 0;
  bit directed = 0;
  // directed stimulus for the read table
  logic d_alloc = 0, d_beat = 0, d_last = 0;

  logic        w_bhit, w_chit, w_full, w_ovf, r_bhit, r_chit, r_full, r_ovf;
  logic [31:0] w_baddr, w_caddr, w_cts, r_baddr, r_caddr, r_cts;
  logic [IW-1:0] w_beid, r_beid;

  axi_traffic_gen #(.DATA_W(64), .ID_W(IW)) gen (.*);

  axi_pend_table #(.IS_WRITE(1'b1)) u_w (
    .clk, .rst_n, .now, .alloc(awvalid && awready), .a_id(awid), .a_addr(awaddr), .a_len(awlen),
    .a_size(awsize), .a_burst(awburst), .beat(wvalid && wready), .beat_id('0), .beat_last(wlast),
    .beat_hit(w_bhit), .beat_addr(w_baddr), .beat_eid(w_beid),
    .cmp(bvalid && bready), .cmp_id(bid), .cmp_hit(w_chit), .cmp_addr(w_caddr), .cmp_ts(w_cts),
    .full(w_full), .overflow(w_ovf));

  axi_pend_table #(.IS_WRITE(1'b0)) u_r (
    .clk, .rst_n, .now,
    .alloc(directed ? d_alloc : arvalid && arready), .a_id(directed ? 4'd5 : arid),
    .a_addr(directed ? 32'h38 : araddr), .a_len(directed ? 8'd3 : arlen),
    .a_size(directed ? 3'd3 : arsize), .a_burst(directed ? 2'd2 : arburst),
    .beat(directed ? d_beat : rvalid && rready), .beat_id(directed ? 4'd5 : rid),
    .beat_last(directed ? d_last : rlast),
    .beat_hit(r_bhit), .beat_addr(r_baddr), .beat_eid(r_beid),
    .cmp(directed ? d_beat && d_last : rvalid && rready && rlast), .cmp_id(directed ? 4'd5 : rid),
    .cmp_hit(r_chit), .cmp_addr(r_caddr), .cmp_ts(r_cts),
    .full(r_full), .overflow(r_ovf));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) now <= now + 1;

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

  initial begin
    logic [31:0] wrap_exp [4] = '{32'h38, 32'h20, 32'h28, 32'h30};
    repeat (3) @(negedge clk);
    rst_n = 1; en = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk); #4;
      if (cyc == 3500) en = 0;
      if (wvalid && wready) begin
        n_wbeats++;
        check(w_bhit && w_baddr == exp_wd_addr && w_beid == exp_wd_id, $sformatf("cyc %0d W beat", cyc));
      end
      if (rvalid && rready) begin
        n_rbeats++;
        check(r_bhit && r_baddr == exp_rd_addr && r_beid == rid, $sformatf("cyc %0d R beat", cyc));
      end
      if (bvalid && bready)
        check(w_chit && w_caddr == exp_wc_addr && now - w_cts == 32'(exp_wc_lat), $sformatf("cyc %0d B", cyc));
      if (rvalid && rready && rlast)
        check(r_chit && r_caddr == exp_rc_addr && now - r_cts == 32'(exp_rc_lat), $sformatf("cyc %0d R last", cyc));
      if (w_full || r_full) n_full++;
      check(!w_ovf && !r_ovf, "no overflow");
    end
    check(outstanding == 0 && !w_full && !r_full, "drained");
    check(n_full > 0 && n_rbeats > 500 && n_wbeats > 500, "tables were filled");
    // directed WRAP burst
    directed = 1;
    @(negedge clk); d_alloc = 1;
    @(negedge clk); d_alloc = 0;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); d_beat = 1; d_last = (b == 3); #1;
      check(r_bhit && r_baddr == wrap_exp[b], $sformatf("wrap beat %0d addr %h", b, r_baddr));
      if (b == 3) check(r_chit && r_caddr == 32'h38, "wrap completion");
    end
    @(negedge clk); d_beat = 0; d_last = 0; #1;
    check(!r_full, "entry freed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

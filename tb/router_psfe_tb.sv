// router_psfe_tb: self-checking test of the router-link front end.
// Sends random packets (whole 3-word flits, random idle cycles, random QoS
// and EOM) and checks, one cycle later, the word number in the flit, the
// header/body/end-of-packet position and the passed fields; then enables
// the shared filter for GT header words and checks the match count.
module router_psfe_tb;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic link_valid = 0, link_eop = 0, link_eom = 0, link_gt = 0;
  logic [31:0] link_data = 0;
  logic f_en = 0;
  logic [2:0] f_pos_en = 0, f_word_en = 0;
  logic [1:0] f_qos_en = 0, f_eom_en = 0;
  logic [31:0] f_ref = 0, f_mask = 0;
  logic w_valid, w_gt, w_eom, match;
  logic [31:0] w_data;
  pkt_pos_e w_pos;
  logic [1:0] w_wordno;
  int checks = 0, failures = 0, n_hdr = 0, n_end = 0, n_match = 0, exp_match = 0;
  // expected annotation of the word sent in the previous cycle
  bit e_v = 0; logic [31:0] e_d; int e_pos, e_wn; bit e_gt, e_eom;

  router_psfe dut (.*);

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

  initial begin
    int flits, w, gt;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 300; pkt++) begin
      if (pkt == 150) begin
        f_en = 1; f_pos_en = 3'b001; f_qos_en = 2'b10; f_eom_en = 2'b11; f_word_en = 3'b111;
      end
      flits = $urandom_range(1, 3);
      gt = $urandom_range(0, 1);
      w = 0;
      for (int k = 0; k < flits * 3; ) begin
        @(negedge clk);
        // check what the previous cycle's word became
        check(w_valid == e_v, "valid delay");
        if (e_v) begin
          check(w_data == e_d && int'(w_pos) == e_pos && int'(w_wordno) == e_wn && w_gt == e_gt && w_eom == e_eom,
                $sformatf("pkt %0d pos %0d/%0d wn %0d/%0d", pkt, w_pos, e_pos, w_wordno, e_wn));
          if (f_en && e_pos == 0 && e_gt) exp_match++;
        end
        if (match && f_en) n_match++;
        if ($urandom_range(0, 3) == 0) begin
          link_valid = 0; e_v = 0;
        end else begin
          link_valid = 1; link_data = $urandom; link_gt = 1'(gt);
          link_eop = (k == flits * 3 - 1); link_eom = link_eop && $urandom_range(0, 1);
          e_v = 1; e_d = link_data; e_gt = link_gt; e_eom = link_eom;
          e_wn = k % 3; e_pos = link_eop ? 2 : (k == 0 ? 0 : 1);
          if (e_pos == 0) n_hdr++;
          if (e_pos == 2) n_end++;
          k++;
        end
      end
    end
    @(negedge clk); link_valid = 0;
    if (f_en && e_v && e_pos == 0 && e_gt) exp_match++;
    if (match) n_match++;
    @(negedge clk);
    check(n_match == exp_match && exp_match > 20, $sformatf("filter matches %0d exp %0d", n_match, exp_match));
    check(n_hdr == 300 && n_end == 300, "every packet had a header and an end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// router_filter_tb: self-checking test of the router-link filter.
// Random configurations and words; the expected match follows from the
// allowed-value sets for packet position, QoS, EOM and word number, the
// data compare under a mask, and the pass-all rule of a disabled filter.
module router_filter_tb;
  import mon_pkg::*;
  logic en, w_valid, w_gt, w_eom, match;
  logic [2:0] pos_en;
  logic [1:0] qos_en, eom_en, w_wordno;
  logic [2:0] word_en;
  logic [31:0] ref_data, mask, w_data;
  pkt_pos_e w_pos;
  int checks = 0, failures = 0, hits = 0, rejects = 0;

  router_filter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    int p;
    for (int n = 0; n < 5000; n++) begin
      en = $urandom_range(0, 4) != 0;
      pos_en = 3'($urandom); qos_en = 2'($urandom); eom_en = 2'($urandom); word_en = 3'($urandom);
      ref_data = $urandom; mask = ($urandom_range(0, 1) != 0) ? 32'h0 : 32'h0000FFFF;
      w_data = ($urandom_range(0, 1) != 0) ? ref_data : $urandom;
      p = $urandom_range(0, 2);
      w_pos = pkt_pos_e'(p);
      w_gt = 1'($urandom); w_eom = 1'($urandom); w_wordno = 2'($urandom_range(0, 2));
      w_valid = $urandom_range(0, 7) != 0;
      #1;
      exp = w_valid && (!en || (pos_en[p] && qos_en[w_gt] && eom_en[w_eom] && word_en[w_wordno] &&
                                (((w_data ^ ref_data) & mask) == 0)));
      checks++;
      if (match !== exp) begin failures++; $display("FAIL n=%0d", n); end
      if (exp) hits++; else if (w_valid && en) rejects++;
    end
    checks++;
    if (hits == 0 || rejects == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

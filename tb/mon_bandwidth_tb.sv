// mon_bandwidth_tb: self-checking test of the bandwidth accumulators.
// Drives a random 'used' pattern, keeps its own count of used and total
// cycles, and compares after every clock edge; checks the clear command and
// saturation (with a second, 4-bit instance).
module mon_bandwidth_tb;
  logic clk = 0, rst_n = 0, clr = 0, used = 0;
  logic [31:0] used_cnt, total_cnt;
  logic [3:0]  s_used, s_total;
  int checks = 0, failures = 0;
  longint ref_used = 0, ref_total = 0;

  mon_bandwidth dut (.clk, .rst_n, .clr, .used, .used_cnt, .total_cnt);
  mon_bandwidth #(.CNT_W(4)) dut_s (.clk, .rst_n, .clr, .used, .used_cnt(s_used), .total_cnt(s_total));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      used = ($urandom_range(0, 99) < 37);
      clr  = (cyc == 150);
      @(posedge clk);
      if (clr) begin ref_used = 0; ref_total = 0; end
      else begin ref_total++; if (used) ref_used++; end
      #1;
      check(used_cnt == 32'(ref_used) && total_cnt == 32'(ref_total),
            $sformatf("cyc %0d used %0d/%0d total %0d/%0d", cyc, used_cnt, ref_used, total_cnt, ref_total));
      check(s_total == ((ref_total > 15) ? 4'd15 : 4'(ref_total)) &&
            s_used  == ((ref_used  > 15) ? 4'd15 : 4'(ref_used)), $sformatf("saturation cyc %0d", cyc));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

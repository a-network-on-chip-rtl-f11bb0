// mon_latency_tb: self-checking test of the latency statistics.
// Sends random samples on two inputs (sometimes both in one cycle), keeps a
// reference last/max/sum/count, and checks the sticky interrupt against a
// programmed threshold and the clear command.
module mon_latency_tb;
  logic clk = 0, rst_n = 0, clr = 0, irq;
  logic [1:0] smp_v = 0;
  logic [1:0][31:0] smp = 0;
  logic [31:0] lat_max = 0, last, max, sum, count;
  int checks = 0, failures = 0, irq_seen = 0;
  longint r_last = 0, r_max = 0, r_sum = 0, r_cnt = 0;
  bit r_irq = 0;

  mon_latency dut (.clk, .rst_n, .clr, .smp_v, .smp, .lat_max, .last, .max, .sum, .count,
                   .latency_interrupt(irq));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      smp_v   = 2'($urandom_range(0, 3));
      smp[0]  = 32'($urandom_range(1, 200));
      smp[1]  = 32'($urandom_range(1, 200));
      lat_max = (cyc < 200) ? 32'd0 : 32'd190;
      clr     = (cyc == 100 || cyc == 300);
      @(posedge clk);
      if (clr) begin r_last = 0; r_max = 0; r_sum = 0; r_cnt = 0; r_irq = 0; end
      else for (int i = 0; i < 2; i++) if (smp_v[i]) begin
        r_last = smp[i];
        if (smp[i] > r_max) r_max = smp[i];
        r_sum += smp[i];
        r_cnt++;
        if (lat_max != 0 && smp[i] > lat_max) r_irq = 1;
      end
      #1;
      if (irq) irq_seen++;
      check(last == 32'(r_last) && max == 32'(r_max), $sformatf("cyc %0d last %0d/%0d max %0d/%0d", cyc, last, r_last, max, r_max));
      check(sum == 32'(r_sum) && count == 32'(r_cnt), $sformatf("cyc %0d sum %0d/%0d cnt %0d/%0d", cyc, sum, r_sum, count, r_cnt));
      check(irq == r_irq, $sformatf("cyc %0d irq %0b/%0b", cyc, irq, r_irq));
    end
    check(irq_seen > 0, "interrupt raised at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

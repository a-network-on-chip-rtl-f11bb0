// mon_trigger_tb: self-checking test of trigger generation.
// Feeds random matches on two inputs, keeps a reference count, and checks
// that dbg_trigger_req rises exactly one cycle after the edge at which the
// count reaches the trigger value, stays up until acknowledged, then sets
// 'fired' and stays low until the clear command re-arms the unit.
module mon_trigger_tb;
  logic clk = 0, rst_n = 0, clr = 0, ack = 0, req, fired;
  logic [1:0]  match = 0;
  logic [31:0] tval = 0, count;
  int checks = 0, failures = 0, triggers = 0;
  longint ref_cnt = 0;
  bit ref_req = 0, ref_fired = 0;

  mon_trigger dut (.clk, .rst_n, .clr, .match, .trig_value(tval), .dbg_trigger_req(req),
                   .dbg_trigger_ack(ack), .count, .fired);

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
    for (int round = 0; round < 4; round++) begin
      @(negedge clk);
      tval = 32'($urandom_range(5, 40));
      clr  = 1;
      @(posedge clk); #1;
      ref_cnt = 0; ref_req = 0; ref_fired = 0;
      clr = 0;
      check(count == 0 && !req && !fired, "after clear");
      for (int cyc = 0; cyc < 120; cyc++) begin
        @(negedge clk);
        match = 2'($urandom_range(0, 3));
        ack   = req && ($urandom_range(0, 2) == 0);
        @(posedge clk);
        // reference model of the edge just taken
        if (ref_req) begin
          if (ack) begin ref_req = 0; ref_fired = 1; end
        end else if (!ref_fired && ref_cnt + match[0] + match[1] >= tval) begin
          ref_req = 1; triggers++;
        end
        ref_cnt += match[0] + match[1];
        #1;
        check(count == 32'(ref_cnt), $sformatf("count %0d exp %0d", count, ref_cnt));
        check(req == ref_req && fired == ref_fired,
              $sformatf("round %0d cyc %0d req %0b/%0b fired %0b/%0b", round, cyc, req, ref_req, fired, ref_fired));
      end
    end
    check(triggers >= 4, "every round triggered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

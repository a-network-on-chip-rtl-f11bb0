// mon_crc_tb: self-checking test of the signature unit.
// Checks the CRC-32 (non-reflected, init all ones, no final xor) of the
// ASCII string "123456789" fed one byte per cycle, against the published
// check value 0x0376E6E7 of that variant, then random two-input traffic
// against a table-free reference computed here bit by bit, and the clear.
module mon_crc_tb;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [1:0] v8 = 0, v = 0;
  logic [1:0][7:0]  d8 = 0;
  logic [1:0][95:0] d = 0;
  logic [31:0] crc8, crc;
  int checks = 0, failures = 0;
  logic [31:0] r;

  mon_crc #(.DW(8),  .N_IN(2)) dut8 (.clk, .rst_n, .clr, .in_v(v8), .in_d(d8), .crc(crc8));
  mon_crc dut (.clk, .rst_n, .clr, .in_v(v), .in_d(d), .crc);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_step(input logic [31:0] c, input logic [95:0] x, input int n);
    for (int b = n - 1; b >= 0; b--) begin
      logic fb;
      fb = c[31] ^ x[b];
      c  = c << 1;
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

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
    string s;
    s = "123456789";
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(crc8 == 32'hFFFFFFFF, "initial value");
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      v8 = 2'b01; d8[0] = s[i];
    end
    @(negedge clk); v8 = 0;
    check(crc8 == 32'h0376E6E7, $sformatf("check value %h", crc8));
    // random traffic on the 96-bit instance
    r = 32'hFFFFFFFF;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      v = 2'($urandom_range(0, 3));
      d[0] = {$urandom, $urandom, $urandom};
      d[1] = {$urandom, $urandom, $urandom};
      clr = (cyc == 120);
      @(posedge clk);
      if (clr) r = 32'hFFFFFFFF;
      else for (int i = 0; i < 2; i++) if (v[i]) r = ref_step(r, d[i], 96);
      #1;
      check(crc == r, $sformatf("cyc %0d crc %h exp %h", cyc, crc, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

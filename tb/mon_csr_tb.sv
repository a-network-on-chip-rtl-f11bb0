// mon_csr_tb: self-checking test of the control and status registers.
// Writes random values to every configuration word and reads them back
// (read data one cycle after dbg_rd), reads the status inputs, checks that
// a command write gives a one-cycle pulse and is not stored, and that
// unmapped addresses read zero.
module mon_csr_tb;
  import mon_pkg::*;
  localparam int NC = 6, NS = 3;
  logic clk = 0, rst_n = 0, dbg_wr = 0, dbg_rd = 0;
  logic [7:0] dbg_addr = 0;
  logic [31:0] dbg_wdata = 0, dbg_rdata, cmd;
  logic [NC-1:0][31:0] cfg;
  logic [NS-1:0][31:0] stat;
  logic [31:0] shadow [NC];
  int checks = 0, failures = 0, pulses = 0;

  mon_csr #(.N_CFG(NC), .N_STAT(NS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd != 0) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); dbg_addr = a; dbg_wdata = d; dbg_wr = 1;
    @(negedge clk); dbg_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); dbg_addr = a; dbg_rd = 1;
    @(negedge clk); dbg_rd = 0; d = dbg_rdata;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < NS; i++) stat[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NC; i++) begin
      rd(8'(i), d);
      check(d == 0 && cfg[i] == 0, "config resets to zero");
    end
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < NC; i++) begin shadow[i] = $urandom; wr(8'(i), shadow[i]); end
      for (int i = 0; i < NC; i++) begin
        rd(8'(i), d);
        check(d == shadow[i] && cfg[i] == shadow[i], $sformatf("cfg %0d = %h exp %h", i, d, shadow[i]));
      end
    end
    for (int i = 0; i < NS; i++) begin
      rd(STAT_BASE + 8'(i), d);
      check(d == stat[i], $sformatf("stat %0d", i));
    end
    rd(STAT_BASE + 8'(NS), d); check(d == 0, "unmapped status reads zero");
    rd(8'h40, d);              check(d == 0, "unmapped config reads zero");
    // command pulse: visible for exactly one cycle after the write edge
    @(negedge clk); dbg_addr = CMD_ADDR; dbg_wdata = 32'h15; dbg_wr = 1;
    @(negedge clk); dbg_wr = 0;
    check(cmd == 32'h15, "command pulse");
    @(negedge clk);
    check(cmd == 0, "command pulse lasts one cycle");
    check(pulses == 1, "one pulse");
    for (int i = 0; i < NC; i++) check(cfg[i] == shadow[i], "command write leaves config alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

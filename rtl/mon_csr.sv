// mon_csr: control and status registers of one monitor.
//
// The monitor is programmed and read through a simple word-addressed debug
// register port, which a TAP data register or a functional bus can drive.
// Addresses 0 .. N_CFG-1 hold read/write configuration words (filter
// criteria, trigger value, latency threshold). A write to CMD_ADDR is not
// stored: every 1 bit gives a one-cycle pulse on `cmd` that clears a
// measurement unit. Addresses STAT_BASE .. STAT_BASE+N_STAT-1 read the
// status inputs (counters, signatures, flags).
//
// Timing: a write takes effect at the clock edge where dbg_wr is high; read
// data is registered and valid on dbg_rdata the cycle after dbg_rd. Unmapped
// addresses read as zero. Configuration words reset to zero, which leaves
// every filter disabled (passing all traffic) and every trigger disabled.
// The register map and port timing are this design's choices.
module mon_csr
  import mon_pkg::*;
#(
  parameter int unsigned N_CFG  = 32,
  parameter int unsigned N_STAT = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [DBG_AW-1:0]             dbg_addr,
  input  logic                          dbg_wr,
  input  logic                          dbg_rd,
  input  logic [DBG_DW-1:0]             dbg_wdata,
  output logic [DBG_DW-1:0]             dbg_rdata,
  output logic [N_CFG-1:0][DBG_DW-1:0]  cfg,
  input  logic [N_STAT-1:0][DBG_DW-1:0] stat,
  output logic [DBG_DW-1:0]             cmd
);

  logic [DBG_DW-1:0] rd_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
      cmd <= '0;
    end else begin
      cmd <= '0;
      if (dbg_wr) begin
        if (dbg_addr == CMD_ADDR) cmd <= dbg_wdata;
        else if (int'(dbg_addr) < int'(N_CFG)) cfg[dbg_addr] <= dbg_wdata;
      end
    end
  end

  always_comb begin
    rd_word = '0;
    if (int'(dbg_addr) < int'(N_CFG))
      rd_word = cfg[dbg_addr];
    else if (dbg_addr >= STAT_BASE && int'(dbg_addr) - int'(STAT_BASE) < int'(N_STAT))
      rd_word = stat[dbg_addr - STAT_BASE];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dbg_rdata <= '0;
    else if (dbg_rd) dbg_rdata <= rd_word;
  end

endmodule

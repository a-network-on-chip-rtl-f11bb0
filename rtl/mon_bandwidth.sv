// mon_bandwidth: bandwidth utilisation accumulators.
//
// `used_cnt` counts the cycles in which the monitored link carries data that
// passes the unit's transaction filter (`used` high); `total_cnt` counts all
// cycles since the last clear. Utilisation is used_cnt / total_cnt, computed
// off-line by the debugger, as the monitor template prescribes. `clr` (one
// cycle, from the command register) zeroes both. The counters saturate at
// all ones rather than wrap, a choice of this design, so an over-long
// interval reads as saturated instead of giving a wrong ratio.
module mon_bandwidth #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             used,
  output logic [CNT_W-1:0] used_cnt,
  output logic [CNT_W-1:0] total_cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_cnt  <= '0;
      total_cnt <= '0;
    end else if (clr) begin
      used_cnt  <= '0;
      total_cnt <= '0;
    end else begin
      if (total_cnt != '1)        total_cnt <= total_cnt + 1'b1;
      if (used && used_cnt != '1) used_cnt  <= used_cnt + 1'b1;
    end
  end

endmodule

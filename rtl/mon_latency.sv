// mon_latency: transaction latency statistics.
//
// Takes up to N_IN latency samples per cycle (one per AXI direction) and
// keeps: the most recent sample (`last`; the highest-numbered input wins when
// several arrive together), the maximum, the sum of all samples and the
// number of samples since the last clear. The average latency is sum/count,
// computed off-line as the monitor template prescribes. When a sample
// exceeds the programmed `lat_max`, `latency_interrupt` is raised and stays
// high until `clr`; lat_max = 0 disables it. All statistics update at the
// clock edge where the sample is valid. Sum and count saturate. The sticky
// interrupt, the zero-disable rule and saturation are this design's choices.
module mon_latency #(
  parameter int unsigned LAT_W = 32,
  parameter int unsigned N_IN  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic [N_IN-1:0]            smp_v,
  input  logic [N_IN-1:0][LAT_W-1:0] smp,
  input  logic [LAT_W-1:0]           lat_max,
  output logic [LAT_W-1:0]           last,
  output logic [LAT_W-1:0]           max,
  output logic [LAT_W-1:0]           sum,
  output logic [LAT_W-1:0]           count,
  output logic                       latency_interrupt
);

  logic [LAT_W-1:0] last_nxt, max_nxt, sum_nxt, cnt_nxt;
  logic [LAT_W:0]   acc;
  logic             over;

  always_comb begin
    last_nxt = last;
    max_nxt  = max;
    sum_nxt  = sum;
    cnt_nxt  = count;
    over     = 1'b0;
    acc      = '0;
    for (int i = 0; i < int'(N_IN); i++) begin
      if (smp_v[i]) begin
        last_nxt = smp[i];
        if (smp[i] > max_nxt) max_nxt = smp[i];
        acc      = {1'b0, sum_nxt} + {1'b0, smp[i]};
        sum_nxt  = acc[LAT_W] ? '1 : acc[LAT_W-1:0];
        if (cnt_nxt != '1) cnt_nxt = cnt_nxt + 1'b1;
        if (lat_max != '0 && smp[i] > lat_max) over = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= '0; max <= '0; sum <= '0; count <= '0;
      latency_interrupt <= 1'b0;
    end else if (clr) begin
      last <= '0; max <= '0; sum <= '0; count <= '0;
      latency_interrupt <= 1'b0;
    end else begin
      last  <= last_nxt;
      max   <= max_nxt;
      sum   <= sum_nxt;
      count <= cnt_nxt;
      if (over) latency_interrupt <= 1'b1;
    end
  end

endmodule

// mon_trigger: debug trigger generation.
//
// Counts the transactions that pass the unit's filter (up to N_IN per cycle,
// e.g. one per AXI direction). When the count reaches the programmed
// `trig_value`, the unit raises dbg_trigger_req and holds it until
// dbg_trigger_ack is seen high; it then sets `fired` and makes no further
// request until `clr` re-arms it (clr also zeroes the count). A trig_value
// of 0 disables the request. The request rises one cycle after the clock
// edge that counts the match reaching the value. Counting continues after
// the trigger so the count stays readable. The req/ack pair is the one of
// the monitor template; holding, re-arming and the zero-disable rule are
// choices of this design.
module mon_trigger #(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned N_IN  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [N_IN-1:0]  match,
  input  logic [CNT_W-1:0] trig_value,
  output logic             dbg_trigger_req,
  input  logic             dbg_trigger_ack,
  output logic [CNT_W-1:0] count,
  output logic             fired
);

  logic [CNT_W-1:0] n_match;
  logic [CNT_W:0]   sum;
  logic [CNT_W-1:0] count_nxt;

  always_comb begin
    n_match = '0;
    for (int i = 0; i < int'(N_IN); i++) n_match += CNT_W'(match[i]);
    sum       = {1'b0, count} + {1'b0, n_match};
    count_nxt = sum[CNT_W] ? '1 : sum[CNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count           <= '0;
      dbg_trigger_req <= 1'b0;
      fired           <= 1'b0;
    end else if (clr) begin
      count           <= '0;
      dbg_trigger_req <= 1'b0;
      fired           <= 1'b0;
    end else begin
      count <= count_nxt;
      if (dbg_trigger_req) begin
        if (dbg_trigger_ack) begin
          dbg_trigger_req <= 1'b0;
          fired           <= 1'b1;
        end
      end else if (!fired && trig_value != '0 && count_nxt >= trig_value) begin
        dbg_trigger_req <= 1'b1;
      end
    end
  end

  // A request, once made, stays up until it is acknowledged or cleared.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    dbg_trigger_req && !dbg_trigger_ack && !clr |=> dbg_trigger_req);

endmodule

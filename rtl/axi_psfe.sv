// axi_psfe: protocol-specific front end of an AXI bus monitor.
//
// Watches the five AXI4 channels of one link without driving them and turns
// handshakes into protocol-independent events for the measurement units:
//  * a data event per W or R beat (valid & ready), carrying the beat's
//    slave-side address, its data, the transaction ID and the last flag;
//  * a completion event per finished transaction (B handshake for writes,
//    last R beat for reads), carrying the ID, start address and latency in
//    cycles from the address handshake to the completion.
// Two axi_pend_table instances (one per direction, MAX_PEND entries each)
// hold the pending transactions; a free-running cycle counter provides the
// issue times. Events are combinational from the bus signals, i.e. in the
// same cycle as the handshake. `ovf` is a sticky flag, set when an address
// finds its table full (that transaction is then not tracked) and cleared
// by `clr_ovf`. Write data ahead of its address is reported with address 0
// and ID 0, and gives no latency sample. Address tracking and per-beat
// address calculation follow the monitor description; AXI4 ordering rules
// and the handling of the corner cases are this design's.
module axi_psfe
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned ID_W     = 4,
  parameter int unsigned MAX_PEND = 8,
  parameter int unsigned LAT_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // monitored AXI4 link (all inputs: the monitor only listens)
  input  logic              awvalid, awready,
  input  logic [ID_W-1:0]   awid,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic [2:0]        awsize,
  input  logic [1:0]        awburst,
  input  logic              wvalid, wready,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wlast,
  input  logic              bvalid, bready,
  input  logic [ID_W-1:0]   bid,
  input  logic              arvalid, arready,
  input  logic [ID_W-1:0]   arid,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  input  logic              rvalid, rready,
  input  logic [ID_W-1:0]   rid,
  input  logic [DATA_W-1:0] rdata,
  input  logic              rlast,
  input  logic              clr_ovf,
  // write data events
  output logic              wd_v,
  output logic [ADDR_W-1:0] wd_addr,
  output logic [DATA_W-1:0] wd_data,
  output logic [ID_W-1:0]   wd_id,
  // read data events
  output logic              rd_v,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  output logic [ID_W-1:0]   rd_id,
  // completion events
  output logic              wc_v,
  output logic [ID_W-1:0]   wc_id,
  output logic [ADDR_W-1:0] wc_addr,
  output logic [LAT_W-1:0]  wc_lat,
  output logic              rc_v,
  output logic [ID_W-1:0]   rc_id,
  output logic [ADDR_W-1:0] rc_addr,
  output logic [LAT_W-1:0]  rc_lat,
  output logic              ovf
);

  logic [LAT_W-1:0] now, w_ts, r_ts;
  logic             w_ovf, r_ovf, w_full, r_full, w_hit, r_hit;
  logic [ID_W-1:0]  r_eid;
  logic             aw_hs, w_hs, b_hs, ar_hs, r_hs;

  assign aw_hs = awvalid && awready;
  assign w_hs  = wvalid && wready;
  assign b_hs  = bvalid && bready;
  assign ar_hs = arvalid && arready;
  assign r_hs  = rvalid && rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0;
      ovf <= 1'b0;
    end else begin
      now <= now + 1'b1;
      if (clr_ovf)            ovf <= 1'b0;
      else if (w_ovf || r_ovf) ovf <= 1'b1;
    end
  end

  axi_pend_table #(.MAX_PEND(MAX_PEND), .ID_W(ID_W), .ADDR_W(ADDR_W), .TS_W(LAT_W),
                   .IS_WRITE(1'b1)) u_wr (
    .clk, .rst_n, .now,
    .alloc(aw_hs), .a_id(awid), .a_addr(awaddr), .a_len(awlen), .a_size(awsize), .a_burst(awburst),
    .beat(w_hs), .beat_id('0), .beat_last(wlast),
    .beat_hit(w_hit), .beat_addr(wd_addr), .beat_eid(wd_id),
    .cmp(b_hs), .cmp_id(bid), .cmp_hit(wc_v), .cmp_addr(wc_addr), .cmp_ts(w_ts),
    .full(w_full), .overflow(w_ovf)
  );

  axi_pend_table #(.MAX_PEND(MAX_PEND), .ID_W(ID_W), .ADDR_W(ADDR_W), .TS_W(LAT_W),
                   .IS_WRITE(1'b0)) u_rd (
    .clk, .rst_n, .now,
    .alloc(ar_hs), .a_id(arid), .a_addr(araddr), .a_len(arlen), .a_size(arsize), .a_burst(arburst),
    .beat(r_hs), .beat_id(rid), .beat_last(rlast),
    .beat_hit(r_hit), .beat_addr(rd_addr), .beat_eid(r_eid),
    .cmp(r_hs && rlast), .cmp_id(rid), .cmp_hit(rc_v), .cmp_addr(rc_addr), .cmp_ts(r_ts),
    .full(r_full), .overflow(r_ovf)
  );

  always_comb begin
    wd_v    = w_hs;
    wd_data = wdata;
    rd_v    = r_hs;
    rd_data = rdata;
    rd_id   = rid;
    wc_id   = bid;
    rc_id   = rid;
    wc_lat  = now - w_ts;
    rc_lat  = now - r_ts;
  end

  // AXI rule: a valid that is not yet accepted must stay asserted.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n) awvalid && !awready |=> awvalid);
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n) arvalid && !arready |=> arvalid);

endmodule

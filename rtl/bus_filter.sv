// bus_filter: transaction filter for a bus monitor.
//
// Decides, in the same cycle, whether an observed bus event counts for the
// measurement unit behind it. When the filter is enabled an event matches
// if all of these hold: its direction is enabled (`dir_en`), its address lies
// in [addr_lo, addr_hi] (both ends included), its data equals `ref_data` on
// every bit set in `mask`, and, when `id_en` is set, its transaction ID
// equals `ref_id`. A disabled filter passes every valid event. The four
// criteria (address range, reference data, mask, optional ID) are those of
// the monitor template; inclusive range ends and the pass-all default are
// this design's choices. Purely combinational.
module bus_filter #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned ID_W   = 4
) (
  // configuration
  input  logic              en,
  input  logic              dir_en,
  input  logic              id_en,
  input  logic [ADDR_W-1:0] addr_lo,
  input  logic [ADDR_W-1:0] addr_hi,
  input  logic [DATA_W-1:0] ref_data,
  input  logic [DATA_W-1:0] mask,
  input  logic [ID_W-1:0]   ref_id,
  // observed event
  input  logic              ev_valid,
  input  logic [ADDR_W-1:0] ev_addr,
  input  logic [DATA_W-1:0] ev_data,
  input  logic [ID_W-1:0]   ev_id,
  output logic              match
);

  logic in_range, data_ok, id_ok;

  always_comb begin
    in_range = (ev_addr >= addr_lo) && (ev_addr <= addr_hi);
    data_ok  = ((ev_data ^ ref_data) & mask) == '0;
    id_ok    = !id_en || (ev_id == ref_id);
    match    = ev_valid && (!en || (dir_en && in_range && data_ok && id_ok));
  end

endmodule

// router_filter: transaction filter for a router-link monitor.
//
// Decides, in the same cycle, whether a word seen on a NoC link counts.
// When enabled, a word matches if its packet position (header, body, end of
// packet), its QoS class (Best Effort or Guaranteed Throughput), its End of
// Message flag and its word number within the flit are each among the
// allowed values (one enable bit per value), and its data equals `ref_data`
// on the bits set in `mask`. A disabled filter passes every valid word. The
// characteristics filtered on are those named for the router monitor; the
// one-enable-per-value encoding is this design's. Purely combinational.
module router_filter
  import mon_pkg::*;
#(
  parameter int unsigned LINK_W     = 32,
  parameter int unsigned FLIT_WORDS = 3,
  localparam int unsigned WN_W      = (FLIT_WORDS > 1) ? $clog2(FLIT_WORDS) : 1
) (
  // configuration
  input  logic                  en,
  input  logic [2:0]            pos_en,    // [0] header [1] body [2] end of packet
  input  logic [1:0]            qos_en,    // [0] BE [1] GT
  input  logic [1:0]            eom_en,    // [0] eom=0 [1] eom=1
  input  logic [FLIT_WORDS-1:0] word_en,   // one bit per word number
  input  logic [LINK_W-1:0]     ref_data,
  input  logic [LINK_W-1:0]     mask,
  // observed word
  input  logic                  w_valid,
  input  logic [LINK_W-1:0]     w_data,
  input  pkt_pos_e              w_pos,
  input  logic                  w_gt,
  input  logic                  w_eom,
  input  logic [WN_W-1:0]       w_wordno,
  output logic                  match
);

  logic pos_ok, qos_ok, eom_ok, word_ok, data_ok;

  always_comb begin
    case (w_pos)
      POS_HEADER: pos_ok = pos_en[0];
      POS_BODY:   pos_ok = pos_en[1];
      POS_END:    pos_ok = pos_en[2];
      default:    pos_ok = 1'b0;
    endcase
    qos_ok  = qos_en[w_gt];
    eom_ok  = eom_en[w_eom];
    word_ok = (int'(w_wordno) < int'(FLIT_WORDS)) && word_en[w_wordno];
    data_ok = ((w_data ^ ref_data) & mask) == '0;
    match   = w_valid && (!en || (pos_ok && qos_ok && eom_ok && word_ok && data_ok));
  end

endmodule

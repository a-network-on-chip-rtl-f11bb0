// router_psfe: protocol-specific front end of a router-link monitor.
//
// Observes one NoC link (between two routers, or a router and a network
// interface) and turns each valid word into an event annotated with what
// the link protocol implies: the word number within its flit, its position
// in the packet (header, body, end of packet), its QoS class and its End of
// Message flag. It contains the single transaction filter that all
// functions of the router monitor share, and outputs its match.
//
// Link format (this design's assumption): link_valid marks a word,
// link_eop the last word of a packet, link_eom the End of Message flag,
// link_gt the QoS (1 = Guaranteed Throughput, 0 = Best Effort). The word
// number counts valid words modulo FLIT_WORDS and restarts after the end of
// a packet; the first word after an end of packet (or reset) is a header.
// Timing: the link is registered once; event fields and `match` are valid
// one cycle after the word is on the link.
module router_psfe
  import mon_pkg::*;
#(
  parameter int unsigned LINK_W     = 32,
  parameter int unsigned FLIT_WORDS = 3,
  localparam int unsigned WN_W      = (FLIT_WORDS > 1) ? $clog2(FLIT_WORDS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // monitored link (passive)
  input  logic                  link_valid,
  input  logic [LINK_W-1:0]     link_data,
  input  logic                  link_eop,
  input  logic                  link_eom,
  input  logic                  link_gt,
  // shared filter configuration
  input  logic                  f_en,
  input  logic [2:0]            f_pos_en,
  input  logic [1:0]            f_qos_en,
  input  logic [1:0]            f_eom_en,
  input  logic [FLIT_WORDS-1:0] f_word_en,
  input  logic [LINK_W-1:0]     f_ref,
  input  logic [LINK_W-1:0]     f_mask,
  // annotated word and filter result
  output logic                  w_valid,
  output logic [LINK_W-1:0]     w_data,
  output pkt_pos_e              w_pos,
  output logic                  w_gt,
  output logic                  w_eom,
  output logic [WN_W-1:0]       w_wordno,
  output logic                  match
);

  logic            in_packet;   // a header has been seen and no end of packet yet
  logic [WN_W-1:0] wcnt;        // word number of the next valid word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_packet <= 1'b0;
      wcnt      <= '0;
      w_valid   <= 1'b0;
      w_data    <= '0;
      w_pos     <= POS_HEADER;
      w_gt      <= 1'b0;
      w_eom     <= 1'b0;
      w_wordno  <= '0;
    end else begin
      w_valid <= link_valid;
      if (link_valid) begin
        w_data   <= link_data;
        w_gt     <= link_gt;
        w_eom    <= link_eom;
        w_wordno <= wcnt;
        if (link_eop)        w_pos <= POS_END;
        else if (!in_packet) w_pos <= POS_HEADER;
        else                 w_pos <= POS_BODY;
        in_packet <= !link_eop;
        if (link_eop || int'(wcnt) == int'(FLIT_WORDS) - 1) wcnt <= '0;
        else                                                wcnt <= wcnt + 1'b1;
      end
    end
  end

  router_filter #(.LINK_W(LINK_W), .FLIT_WORDS(FLIT_WORDS)) u_filter (
    .en(f_en), .pos_en(f_pos_en), .qos_en(f_qos_en), .eom_en(f_eom_en),
    .word_en(f_word_en), .ref_data(f_ref), .mask(f_mask),
    .w_valid(w_valid), .w_data(w_data), .w_pos(w_pos), .w_gt(w_gt),
    .w_eom(w_eom), .w_wordno(w_wordno), .match(match)
  );

endmodule

// mon_crc: checksum (signature) generation.
//
// Folds the attributes of each filtered transaction into a running CRC.
// Up to N_IN attribute words of DW bits may arrive in one cycle; they are
// folded in input order (input 0 first) within that cycle, each word most
// significant bit first. The polynomial is CRC-32 (0x04C11DB7), initial value
// all ones, no reflection and no final inversion; `clr` restores the initial
// value. Comparing signatures taken at several points of a path, or against
// a model, locates where data went wrong. The template asks only for "a
// CRC"; polynomial, bit order and the attributes hashed are this design's.
module mon_crc
  import mon_pkg::*;
#(
  parameter int unsigned DW   = 96,
  parameter int unsigned N_IN = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic [N_IN-1:0]         in_v,
  input  logic [N_IN-1:0][DW-1:0] in_d,
  output logic [31:0]             crc
);

  function automatic logic [31:0] crc_word(input logic [31:0] c, input logic [DW-1:0] d);
    logic [31:0] r;
    r = c;
    for (int b = int'(DW) - 1; b >= 0; b--)
      r = {r[30:0], 1'b0} ^ ((r[31] ^ d[b]) ? CRC_POLY : 32'd0);
    return r;
  endfunction

  logic [31:0] crc_nxt;

  always_comb begin
    crc_nxt = crc;
    for (int i = 0; i < int'(N_IN); i++)
      if (in_v[i]) crc_nxt = crc_word(crc_nxt, in_d[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   crc <= CRC_INIT;
    else if (clr) crc <= CRC_INIT;
    else          crc <= crc_nxt;
  end

endmodule

// bit_interleave: bit-level interleaved pixel transfer (write path).
//
// A bus word normally carries its pixels side by side: pixel i occupies wires
// i*W .. i*W+W-1. Bits of one pixel are weakly correlated, so neighbouring
// wires switch against each other and pay coupling energy. This block
// regroups the word so that adjacent wires carry the same bit position of the
// different pixels: output wire j*LANES + i carries bit j of pixel i. Bits of
// the same weight in neighbouring pixels are strongly correlated, so coupling
// (type-II and type-IV) transitions become rarer. This is the mapping of the
// document's bit-level interleaving figure; the order of the groups on the
// bus (bit 0 group at the low end) is this design's choice.
// Purely combinational wiring with no gates: every output is one input wire,
// so a synthesised netlist of this block holds no cells. bit_deinterleave is
// its inverse.
module bit_interleave #(
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 8
) (
  input  logic [LANES*W-1:0] pix_i,   // pixel i in bits i*W +: W
  output logic [LANES*W-1:0] ilv_o    // bit j of pixel i on wire j*LANES + i
);
  always_comb begin
    for (int i = 0; i < int'(LANES); i++)
      for (int j = 0; j < int'(W); j++)
        ilv_o[j*LANES + i] = pix_i[i*W + j];
  end
endmodule

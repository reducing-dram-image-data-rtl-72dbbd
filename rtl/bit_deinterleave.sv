// bit_deinterleave: inverse of bit_interleave (read path).
//
// Takes a bus word in which wire j*LANES + i carries bit j of pixel i and
// restores the plain layout with pixel i in bits i*W +: W. The document
// draws only the write-side mapping; this inverse and the group order on the
// bus (bit 0 group at the low end) are this design's choices. Purely
// combinational wiring with no gates: every output is one input wire, so a
// synthesised netlist of this block holds no cells. Defaults: eight 8-bit
// pixels on a 64-bit bus.
module bit_deinterleave #(
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 8
) (
  input  logic [LANES*W-1:0] ilv_i,
  output logic [LANES*W-1:0] pix_o
);
  always_comb begin
    for (int i = 0; i < int'(LANES); i++)
      for (int j = 0; j < int'(W); j++)
        pix_o[i*W + j] = ilv_i[j*LANES + i];
  end
endmodule

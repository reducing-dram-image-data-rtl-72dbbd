// gray_enc: binary to Gray conversion of every pixel lane of a bus word.
//
// Each W-bit lane b is converted independently with g[W-1] = b[W-1] and
// g[i] = b[i+1] ^ b[i], exactly the conversion the document gives. Two pixels
// whose values are close then differ in few bits, so successive words on the
// same wires toggle fewer of them. Purely combinational: the output follows
// the input in the same cycle. Lane count and width default to the
// document's 64-bit bus carrying eight 8-bit pixels.
module gray_enc #(
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 8
) (
  input  logic [LANES*W-1:0] bin_i,
  output logic [LANES*W-1:0] gray_o
);
  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      gray_o[l*W + W-1] = bin_i[l*W + W-1];
      for (int i = 0; i < int'(W) - 1; i++)
        gray_o[l*W + i] = bin_i[l*W + i + 1] ^ bin_i[l*W + i];
    end
  end
endmodule

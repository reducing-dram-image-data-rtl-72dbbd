// gray_dec: Gray to binary conversion of every pixel lane of a bus word.
//
// Each W-bit lane g is converted with b[W-1] = g[W-1] and
// b[i] = b[i+1] ^ g[i], from the top bit down, as the document gives it.
// It undoes gray_enc on the read path. Purely combinational (a W-1 deep XOR
// chain per lane). Defaults: eight 8-bit pixel lanes of a 64-bit bus.
module gray_dec #(
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 8
) (
  input  logic [LANES*W-1:0] gray_i,
  output logic [LANES*W-1:0] bin_o
);
  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      bin_o[l*W + W-1] = gray_i[l*W + W-1];
      for (int i = int'(W) - 2; i >= 0; i--)
        bin_o[l*W + i] = bin_o[l*W + i + 1] ^ gray_i[l*W + i];
    end
  end
endmodule

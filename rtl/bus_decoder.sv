// bus_decoder: read-path decoding of one bus word coming out of the DRAM.
//
// Undoes bus_encoder: first bit-level de-interleaving (ilv_en), then Gray to
// binary conversion of every 8-bit lane (gray_en). The settings must match
// the ones the data was written with.
//
// Timing: one register stage with a valid/ready handshake, one word per
// cycle, latency one cycle; 'last' travels with the word.
module bus_decoder
  import dm_pkg::*;
#(
  parameter int unsigned LANES = PPB,
  parameter int unsigned W     = PIX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 gray_en,
  input  logic                 ilv_en,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [LANES*W-1:0]   in_data,
  input  logic                 in_last,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [LANES*W-1:0]   out_data,
  output logic                 out_last
);
  logic [LANES*W-1:0] dil, dsel, b, dec;

  bit_deinterleave #(.LANES(LANES), .W(W)) u_dil (.ilv_i(in_data), .pix_o(dil));
  assign dsel = ilv_en ? dil : in_data;
  gray_dec         #(.LANES(LANES), .W(W)) u_gray (.gray_i(dsel), .bin_o(b));
  assign dec  = gray_en ? b : dsel;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= dec;
        out_last <= in_last;
      end
    end
  end
endmodule

// bus_encoder: write-path encoding of one bus word before it enters the DRAM.
//
// Applies Gray coding to every 8-bit pixel lane (gray_en) and then bit-level
// interleaving (ilv_en), the two data manipulations the document layers on
// top of pixel transfer scheduling. Each step can be switched off: with
// frame recompression the coefficient records are already Gray coded field
// by field and are not interleaved (the document notes that interleaving no
// longer helps once the pixels are transformed), so the top bypasses both.
//
// Timing: one register stage with a valid/ready handshake. in_ready is high
// whenever the output register is empty or being emptied, so the stage runs
// at one word per cycle with a latency of one cycle. The 'last' flag travels
// with the word. gray_en and ilv_en are sampled with the word.
module bus_encoder
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
  logic [LANES*W-1:0] g, gsel, ilv, enc;

  gray_enc       #(.LANES(LANES), .W(W)) u_gray (.bin_i(in_data), .gray_o(g));
  assign gsel = gray_en ? g : in_data;
  bit_interleave #(.LANES(LANES), .W(W)) u_ilv  (.pix_i(gsel), .ilv_o(ilv));
  assign enc  = ilv_en ? ilv : gsel;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= enc;
        out_last <= in_last;
      end
    end
  end
endmodule

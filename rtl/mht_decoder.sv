// mht_decoder: decompression of one record back into eight pixels.
//
// Undoes mht_encoder. Each field is cut out of the record at its offset
// (widths from Table I, see dm_pkg), Gray decoded over its own width when
// gray_en is set, sign extended (the DC field is unsigned) and dequantised
// by shifting it back left (no rounding offset, so a zero coefficient stays
// zero; this reconstruction rule is this design's own choice). The inverse butterflies run from stage 2 down
// to stage 0: from average l and difference h, a = l + floor((h + 1) / 2) and
// b = a - h, which restores the pixels exactly when nothing was quantised
// (QP 0 is lossless). Results are clamped to 0..255. With comp_en low the
// record's low 64 bits are the pixel word.
//
// Timing: one register stage with valid/ready, one group per cycle, latency
// one cycle; 'last' travels with the group.
module mht_decoder
  import dm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   comp_en,
  input  qp_t    qp,
  input  logic   gray_en,
  input  logic   in_valid,
  output logic   in_ready,
  input  rec_t   in_rec,
  input  logic   in_last,
  output logic   out_valid,
  input  logic   out_ready,
  output word_t  out_data,
  output logic   out_last
);
  typedef coef_t coefs_t [NCOEF];

  function automatic word_t mht_inv(coefs_t c);
    coefs_t v;
    coef_t  l, h, a;
    word_t  w;
    v = c;
    for (int s = 2; s >= 0; s--)
      for (int p = 0; p < NCOEF; p++)
        if (((p >> s) & 1) == 0) begin
          l = v[p];
          h = v[p | (1 << s)];
          a = l + ((h + COEF_W'(1)) >>> 1);
          v[p]            = a;
          v[p | (1 << s)] = a - h;
        end
    for (int k = 0; k < NCOEF; k++) begin
      if (v[k] < 0)            w[8*k +: 8] = 8'd0;
      else if (v[k] > 255)     w[8*k +: 8] = 8'd255;
      else                     w[8*k +: 8] = v[k][7:0];
    end
    return w;
  endfunction

  coefs_t c;
  word_t  dec;

  always_comb begin
    logic [15:0] f;
    int unsigned fw, sh;
    f  = '0;
    fw = 0;
    sh = 0;
    for (int k = 0; k < NCOEF; k++) begin
      fw = field_w(qp, k);
      sh = QSHIFT[qp][k];
      f  = 16'(in_rec >> field_off(qp, k)) & ((16'(1) << fw) - 16'(1));
      if (gray_en) f = gray2bin(f, fw);
      // sign extension of the AC fields
      if (k != 0 && f[fw-1]) f = f | ~((16'(1) << fw) - 16'(1));
      c[k] = COEF_W'(f) <<< sh;
    end
    dec = comp_en ? mht_inv(c) : in_rec[BUS_W-1:0];
  end

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

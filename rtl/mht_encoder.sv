// mht_encoder: lossy frame recompression of one group of eight pixels.
//
// The eight pixels of a bus word go through an 8-point modified Hadamard
// transform (MHT). It is built from three butterfly stages; stage s pairs the
// values whose positions differ in bit s and replaces them by their floored
// average and their difference (the integer S-transform butterfly, which is
// exactly invertible). Coefficient Yk thus took the difference in the stages
// named by the set bits of k: Y0 is the DC term (an 8-bit average) and Yk
// needs 8 + popcount(k) signed bits. As in the document, the DC term is kept
// and Y1..Y7 are quantised by an arithmetic right shift whose size comes from
// Table I for the selected QP (QP 0: no quantisation). The shift of Table I
// equals popcount(k) + QP - 1 for QP > 0, which is why every AC coefficient
// then fits in 9 - QP bits.
//
// Each coefficient keeps only its significant bits and the eight fields are
// placed back to back, Y0 at bit 0, giving a record of 76, 64, 57 or 50 bits
// for QP 0..3. With gray_en each field is Gray coded over its own width.
// With comp_en low the block passes the pixel word through as a 64-bit record.
// The exact transform of the document's cited MHT, the record layout and the
// Gray coding of signed fields are this design's choices.
//
// Timing: one register stage with valid/ready, one group per cycle, latency
// one cycle; 'last' travels with the group. The configuration is sampled
// with each group.
module mht_encoder
  import dm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   comp_en,
  input  qp_t    qp,
  input  logic   gray_en,
  input  logic   in_valid,
  output logic   in_ready,
  input  word_t  in_data,     // pixel i in bits 8*i +: 8
  input  logic   in_last,
  output logic   out_valid,
  input  logic   out_ready,
  output rec_t   out_rec,     // record, first bit at bit 0
  output len_t   out_len,     // valid bits in out_rec
  output logic   out_last
);
  typedef coef_t coefs_t [NCOEF];


  function automatic coefs_t mht_fwd(word_t w);
    coefs_t v;
    coef_t  a, b;
    for (int k = 0; k < NCOEF; k++) v[k] = COEF_W'(w[8*k +: 8]);
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < NCOEF; p++)
        if (((p >> s) & 1) == 0) begin
          a = v[p];
          b = v[p | (1 << s)];
          v[p]            = (a + b) >>> 1;
          v[p | (1 << s)] = a - b;
        end
    return v;
  endfunction

  coefs_t y;
  rec_t   rec;
  len_t   len;

  always_comb begin
    logic [15:0] f;
    coef_t       q;
    f   = '0;
    q   = '0;
    y   = mht_fwd(in_data);
    rec = '0;
    len = LEN_W'(BUS_W);
    if (comp_en) begin
      len = LEN_W'(rec_len(qp));
      for (int k = 0; k < NCOEF; k++) begin
        q = y[k] >>> QSHIFT[qp][k];
        f = 16'(q) & ((16'(1) << field_w(qp, k)) - 16'(1));
        if (gray_en) f = bin2gray(f, field_w(qp, k));
        rec = rec | (REC_W'(f) << field_off(qp, k));
      end
    end else begin
      rec = REC_W'(in_data);
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rec   <= '0;
      out_len   <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_rec  <= rec;
        out_len  <= len;
        out_last <= in_last;
      end
    end
  end
endmodule

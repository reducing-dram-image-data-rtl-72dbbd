// mht_ref_pkg: reference model of the MHT recompression used by the
// testbenches. Written with plain integers and an explicit pair list so that
// it does not share code with the RTL. Coefficient k is the result of
// three average/difference stages on adjacent pixels (stage 0), pairs of
// pairs (stage 1) and halves (stage 2); k's bit s tells whether stage s took
// the difference. Quantisation shifts are the QP table of the design.
package mht_ref_pkg;
  // Right shifts of Y0..Y7 for QP 0..3.
  int SHIFT [4][8] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 1, 1, 2, 1, 2, 2, 3},
    '{0, 2, 2, 3, 2, 3, 3, 4},
    '{0, 3, 3, 4, 3, 4, 4, 5}
  };

  function automatic int floordiv2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction
  function automatic int floorshift(int v, int s);
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic int width_of(int qp, int k);
    int pc = (k & 1) + ((k >> 1) & 1) + ((k >> 2) & 1);
    return 8 + pc - SHIFT[qp][k];
  endfunction
  function automatic int len_of(int qp);
    int l = 0;
    for (int k = 0; k < 8; k++) l += width_of(qp, k);
    return l;
  endfunction

  typedef int coefs_t [8];

  function automatic coefs_t fwd(logic [63:0] w);
    coefs_t v;
    for (int i = 0; i < 8; i++) v[i] = int'(w[8*i +: 8]);
    for (int s = 0; s < 3; s++) begin
      coefs_t n = v;
      for (int p = 0; p < 8; p++) begin
        int q = p ^ (1 << s);
        if ((p & (1 << s)) == 0) n[p] = floordiv2(v[p] + v[q]);
        else                     n[p] = v[q] - v[p];
      end
      v = n;
    end
    return v;
  endfunction

  function automatic logic [63:0] inv(coefs_t c);
    coefs_t v = c;
    logic [63:0] w;
    for (int s = 2; s >= 0; s--) begin
      coefs_t n = v;
      for (int p = 0; p < 8; p++) begin
        if ((p & (1 << s)) == 0) begin
          int l = v[p], h = v[p | (1 << s)];
          int a = l + floordiv2(h + 1);
          n[p] = a;
          n[p | (1 << s)] = a - h;
        end
      end
      v = n;
    end
    for (int i = 0; i < 8; i++) w[8*i +: 8] = 8'((v[i] < 0) ? 0 : (v[i] > 255) ? 255 : v[i]);
    return w;
  endfunction

  function automatic int to_gray(int f) ; return f ^ (f >> 1); endfunction
  function automatic int from_gray(int g);
    int b = 0;
    for (int s = 0; s < 16; s++) b ^= (g >> s);
    return b;
  endfunction

  // Record: fields Y0..Y7 back to back from bit 0, each masked to its width.
  function automatic logic [75:0] encode(logic [63:0] w, int qp, bit gray);
    coefs_t c = fwd(w);
    logic [75:0] r = '0;
    int off = 0;
    for (int k = 0; k < 8; k++) begin
      int wd = width_of(qp, k);
      int f = floorshift(c[k], SHIFT[qp][k]) & ((1 << wd) - 1);
      if (gray) f = to_gray(f);
      for (int b = 0; b < wd; b++) r[off + b] = f[b];
      off += wd;
    end
    return r;
  endfunction

  function automatic logic [63:0] decode(logic [75:0] r, int qp, bit gray);
    coefs_t c;
    int off = 0;
    for (int k = 0; k < 8; k++) begin
      int wd = width_of(qp, k);
      int sh = SHIFT[qp][k];
      int f = 0;
      for (int b = 0; b < wd; b++) f |= int'(r[off + b]) << b;
      if (gray) f = from_gray(f);
      if (k != 0 && f >= (1 << (wd - 1))) f -= (1 << wd);
      c[k] = f * (1 << sh);
      off += wd;
    end
    return inv(c);
  endfunction
endpackage

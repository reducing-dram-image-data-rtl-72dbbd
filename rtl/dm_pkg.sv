// dm_pkg: constants, types and small functions shared by the image data
// manipulation blocks (pixel transfer scheduling, Gray coding, bit-level
// interleaving and MHT frame recompression).
//
// Sizes follow the document: a 64-bit DRAM on-chip data bus, 8-bit luminance
// pixels (8 pixels per bus word) and 16x16 macroblocks. The quantisation
// table is the document's Table I. The record layout of a compressed 8-pixel
// group (field widths and offsets) is this design's own choice: every
// coefficient keeps exactly the bits that survive its right shift.
package dm_pkg;

  // Bus and block geometry (document, Sec. III-A and Sec. V).
  localparam int unsigned BUS_W  = 64;            // DRAM on-chip data bus width
  localparam int unsigned PIX_W  = 8;             // bits per pixel
  localparam int unsigned PPB    = BUS_W / PIX_W; // pixels per bus word (8)
  localparam int unsigned BLK_W  = 16;            // macroblock width in pixels
  localparam int unsigned BLK_H  = 16;            // macroblock height in pixels

  // MHT recompression: 8-point transform, so one bus word of pixels is one group.
  localparam int unsigned NCOEF   = 8;
  localparam int unsigned COEF_W  = 12;           // internal signed coefficient width
  localparam int unsigned REC_W   = 76;           // longest record (QP = 0)
  localparam int unsigned LEN_W   = 7;            // width of a record length

  typedef logic [1:0]          qp_t;
  typedef logic [BUS_W-1:0]    word_t;
  typedef logic [REC_W-1:0]    rec_t;
  typedef logic [LEN_W-1:0]    len_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Run-time configuration of the data path.
  typedef struct packed {
    logic comp_en;   // lossy MHT frame recompression on
    qp_t  qp;        // quantisation parameter set of Table I
    logic gray_en;   // Gray coding of pixels / coefficients
    logic ilv_en;    // bit-level interleaving (raw pixels only)
  } dm_cfg_t;

  // Table I: number of right-shift bits of coefficient Y1..Y7 per QP.
  // Index 0 (DC) is never quantised.
  localparam int unsigned QSHIFT [4][8] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 1, 1, 2, 1, 2, 2, 3},
    '{0, 2, 2, 3, 2, 3, 3, 4},
    '{0, 3, 3, 4, 3, 4, 4, 5}
  };

  function automatic int unsigned popcount3(int unsigned k);
    return ((k >> 2) & 1) + ((k >> 1) & 1) + (k & 1);
  endfunction

  // Width of coefficient k as the transform leaves it: the DC term is an
  // 8-bit average, each difference stage adds one bit (signed).
  function automatic int unsigned coef_nat_w(int unsigned k);
    return PIX_W + popcount3(k);
  endfunction

  // Width of coefficient k in a compressed record for a given QP.
  function automatic int unsigned field_w(logic [1:0] qp, int unsigned k);
    return coef_nat_w(k) - QSHIFT[qp][k];
  endfunction

  // Bit offset of coefficient k in a compressed record.
  function automatic int unsigned field_off(logic [1:0] qp, int unsigned k);
    int unsigned off = 0;
    for (int unsigned j = 0; j < k; j++) off += field_w(qp, j);
    return off;
  endfunction

  // Length in bits of a compressed record: 76, 64, 57, 50 for QP 0..3.
  function automatic int unsigned rec_len(logic [1:0] qp);
    return field_off(qp, NCOEF);
  endfunction

  // Binary to Gray over the low w bits of v (g[n-1] = b[n-1], g[i] = b[i+1]^b[i]).
  function automatic logic [15:0] bin2gray(logic [15:0] v, int unsigned w);
    logic [15:0] m;
    m = (16'(1) << w) - 16'(1);
    return ((v & m) ^ ((v & m) >> 1));
  endfunction

  // Gray to binary over the low w bits of g (b[n-1] = g[n-1], b[i] = b[i+1]^g[i]).
  function automatic logic [15:0] gray2bin(logic [15:0] g, int unsigned w);
    logic [15:0] b;
    b = '0;
    for (int i = 15; i >= 0; i--) begin
      if (i < int'(w)) b[i] = g[i] ^ ((i == 15) ? 1'b0 : b[i+1]);
    end
    return b;
  endfunction

endpackage

// dram_image_codec_top: image data path between a video engine and a
// heterogeneous DRAM, built to cut the energy of the DRAM's on-chip data
// routing.
//
// Write path (engine -> DRAM), one 16x16 block at a time, 64-bit words of
// eight 8-bit pixels in raster order at pix_in_*:
//   pixel_scheduler (raster -> column-strip order)
//   -> mht_encoder  (optional lossy recompression, Gray coded fields)
//   -> coef_packer  (records back to back into 64-bit words)
//   -> bus_encoder  (Gray coding + bit-level interleaving of raw pixels)
//   -> bus_wr_*.
// Read path (DRAM -> engine) is the mirror image:
//   bus_rd_* -> bus_decoder -> coef_unpacker -> mht_decoder
//   -> pixel_scheduler (column-strip -> raster order) -> pix_out_*.
// Data written with one configuration must be read back with the same one.
// With recompression off (cfg.comp_en = 0) a block is 32 words each way; with
// it on, 38, 32, 29 or 25 words for QP 0..3. With blk_small set the block is
// an 8x8 chroma block instead: 8 words raw, or 10, 8, 8 or 7 words for QP
// 0..3. cfg and blk_small may only change between blocks, when both paths
// are idle.
//
// Heterogeneous DRAM support: hot_zone_decoder tells for each request address
// whether it falls in the hot data zone, and hot_swap_ctrl copies a region of
// each reference frame from the main array into the hot zone. The DRAM arrays
// themselves are outside this design; their ports are brought out.
//
// From the document: the three data manipulations and their order of use,
// the 64-bit bus of 8-bit pixels, the 16x16 block, the QP table, Gray coding
// but no interleaving of recompressed data, the hot zone found by address
// masking and the region-by-region swap. This design's own choices: the MHT
// butterflies and record layout, the packing of records into words, the
// handshakes, the hot zone's place in the address space, its aligned
// window with a HOT_WORDS size limit (for sizes such as 24 Mb) and a swap
// that only copies into the hot zone.
//
// Timing: every stage has a valid/ready handshake; each path streams one word
// per cycle except for the single-buffered block reorder, which fills for 32
// cycles and then drains for 32. The data manipulations are transparent to
// the DRAM controller: they change only the bit patterns, not the addresses.
module dram_image_codec_top
  import dm_pkg::*;
#(
  parameter int unsigned   ADDR_W   = 25,            // 2 Gb in 64-bit words
  parameter int unsigned   HOT_AW   = 19,            // 32 Mb hot data zone
  parameter logic [24:0]   HOT_BASE = 25'h1F8_0000,
  parameter int unsigned   REF_W    = 3,
  parameter int unsigned   HOT_WORDS = 2 ** HOT_AW          // e.g. 393216 for 24 Mb
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dm_cfg_t           cfg,
  input  logic              blk_small,   // 1: 8x8 chroma block, 0: 16x16 luma
  // write path
  input  logic              pix_in_valid,
  output logic              pix_in_ready,
  input  word_t             pix_in_data,
  output logic              bus_wr_valid,
  input  logic              bus_wr_ready,
  output word_t             bus_wr_data,
  output logic              bus_wr_last,
  // read path
  input  logic              bus_rd_valid,
  output logic              bus_rd_ready,
  input  word_t             bus_rd_data,
  output logic              pix_out_valid,
  input  logic              pix_out_ready,
  output word_t             pix_out_data,
  output logic              pix_out_last,
  // hot data zone address decoding
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              req_hot,
  output logic              req_main,
  output logic [HOT_AW-1:0] req_hot_addr,
  output logic [ADDR_W-1:0] req_main_addr,
  // hot data swap
  input  logic              swap_start,
  input  logic [REF_W-1:0]  swap_n_refs,
  input  logic [ADDR_W-1:0] swap_frame_base,
  input  logic [ADDR_W-1:0] swap_frame_words,
  input  logic [ADDR_W-1:0] swap_region_idx,
  input  logic [HOT_AW:0]   swap_region_words,
  output logic              swap_busy,
  output logic              swap_done,
  output logic              swap_err,
  output logic [31:0]       swap_words,
  output logic              main_rd_valid,
  input  logic              main_rd_ready,
  output logic [ADDR_W-1:0] main_rd_addr,
  input  logic              main_rsp_valid,
  input  word_t             main_rsp_data,
  output logic              hot_wr_en,
  output logic [HOT_AW-1:0] hot_wr_addr,
  output word_t             hot_wr_data
);
  logic bus_gray, bus_ilv;
  len_t cur_len;

  // Raw pixels: Gray and interleave on the bus words. Compressed records:
  // Gray per coefficient field inside the MHT codec, no interleaving.
  assign bus_gray = cfg.gray_en && !cfg.comp_en;
  assign bus_ilv  = cfg.ilv_en  && !cfg.comp_en;
  assign cur_len  = cfg.comp_en ? LEN_W'(rec_len(cfg.qp)) : LEN_W'(BUS_W);

  // ---------------- write path ----------------
  logic  s_valid, s_ready, s_last;
  word_t s_data;
  logic  m_valid, m_ready, m_last;
  rec_t  m_rec;
  len_t  m_len;
  logic  p_valid, p_ready, p_last;
  word_t p_data;

  pixel_scheduler #(.TO_BUS(1'b1)) u_sched_tx (
    .clk, .rst_n, .small_blk(blk_small),
    .in_valid (pix_in_valid), .in_ready (pix_in_ready), .in_data (pix_in_data),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data), .out_last(s_last)
  );

  mht_encoder u_mht_enc (
    .clk, .rst_n,
    .comp_en(cfg.comp_en), .qp(cfg.qp), .gray_en(cfg.gray_en),
    .in_valid (s_valid), .in_ready (s_ready), .in_data(s_data), .in_last(s_last),
    .out_valid(m_valid), .out_ready(m_ready), .out_rec(m_rec), .out_len(m_len),
    .out_last (m_last)
  );

  coef_packer u_pack (
    .clk, .rst_n,
    .in_valid (m_valid), .in_ready (m_ready), .in_rec(m_rec), .in_len(m_len),
    .in_last  (m_last),
    .out_valid(p_valid), .out_ready(p_ready), .out_data(p_data), .out_last(p_last)
  );

  bus_encoder u_bus_enc (
    .clk, .rst_n, .gray_en(bus_gray), .ilv_en(bus_ilv),
    .in_valid (p_valid), .in_ready (p_ready), .in_data(p_data), .in_last(p_last),
    .out_valid(bus_wr_valid), .out_ready(bus_wr_ready), .out_data(bus_wr_data),
    .out_last (bus_wr_last)
  );

  // ---------------- read path ----------------
  logic  d_valid, d_ready, d_last_unused;
  word_t d_data;
  logic  u_valid, u_ready, u_last;
  rec_t  u_rec;
  logic  x_valid, x_ready, x_last_unused;
  word_t x_data;

  bus_decoder u_bus_dec (
    .clk, .rst_n, .gray_en(bus_gray), .ilv_en(bus_ilv),
    .in_valid (bus_rd_valid), .in_ready (bus_rd_ready), .in_data(bus_rd_data),
    .in_last  (1'b0),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data),
    .out_last (d_last_unused)
  );

  coef_unpacker u_unpack (
    .clk, .rst_n, .in_len(cur_len), .small_blk(blk_small),
    .in_valid (d_valid), .in_ready (d_ready), .in_data(d_data),
    .out_valid(u_valid), .out_ready(u_ready), .out_rec(u_rec), .out_last(u_last)
  );

  mht_decoder u_mht_dec (
    .clk, .rst_n,
    .comp_en(cfg.comp_en), .qp(cfg.qp), .gray_en(cfg.gray_en),
    .in_valid (u_valid), .in_ready (u_ready), .in_rec(u_rec), .in_last(u_last),
    .out_valid(x_valid), .out_ready(x_ready), .out_data(x_data),
    .out_last (x_last_unused)
  );

  pixel_scheduler #(.TO_BUS(1'b0)) u_sched_rx (
    .clk, .rst_n, .small_blk(blk_small),
    .in_valid (x_valid), .in_ready (x_ready), .in_data (x_data),
    .out_valid(pix_out_valid), .out_ready(pix_out_ready), .out_data(pix_out_data),
    .out_last (pix_out_last)
  );

  // ---------------- heterogeneous DRAM support ----------------
  hot_zone_decoder #(.ADDR_W(ADDR_W), .HOT_AW(HOT_AW), .HOT_BASE(HOT_BASE),
                    .HOT_WORDS(HOT_WORDS)) u_hzd (
    .req_valid, .req_addr,
    .hot_sel(req_hot), .main_sel(req_main), .hot_addr(req_hot_addr),
    .main_addr(req_main_addr)
  );

  hot_swap_ctrl #(.ADDR_W(ADDR_W), .HOT_AW(HOT_AW), .DATA_W(BUS_W), .REF_W(REF_W),
                 .HOT_WORDS(HOT_WORDS)) u_swap (
    .clk, .rst_n,
    .start(swap_start), .n_refs(swap_n_refs), .frame_base(swap_frame_base),
    .frame_words(swap_frame_words), .region_idx(swap_region_idx),
    .region_words(swap_region_words),
    .busy(swap_busy), .done(swap_done), .err(swap_err),
    .main_rd_valid, .main_rd_ready, .main_rd_addr, .main_rsp_valid, .main_rsp_data,
    .hot_wr_en, .hot_wr_addr, .hot_wr_data, .swap_words
  );
endmodule

// tb_workload_cif_frame: one CIF luminance frame (352x288, 396 macroblocks)
// through dram_image_codec_top at its default parameters.
//
// The frame size is that of the CIF test sequences the source method was
// evaluated on. The picture itself is synthetic, since no video is at hand: a
// lit gradient background, a smooth bright disc and a finely textured
// patch, with a little noise. Every macroblock is written through the write
// path into a behavioural DRAM and read back through the read path in all
// 12 configurations (raw pixels with Gray coding and interleaving off/on,
// MHT recompression at QP 0..3 with binary and Gray coded coefficients),
// and the 396 8x8 blocks of one chroma plane (4:2:0) in four of them,
// with random stalls on both sides. Each pixel read back is checked (exactly,
// or against the integer reference model for QP 1..3), as are the words per
// block, the first bus word of each block and the hot/main routing of each
// address. One configuration is stored in the hot data zone.
//
// Self and coupling transitions on the DRAM bus are counted per
// configuration and printed next to a conventional raster-order binary
// transfer, with the reductions in percent.
module tb_workload_cif_frame;
  import dm_pkg::*;
  import mht_ref_pkg::*;

  localparam int FW = 352, FH = 288, NBLK = (FW / 16) * (FH / 16);
  localparam int HOT_BASE = 32'h01F8_0000;
  localparam int MAIN_BASE = 32'h0000_1000;
  localparam int WORDS [4] = '{38, 32, 29, 25};     // 16x16 luma block
  localparam int CWORDS [4] = '{10, 8, 8, 7};       // 8x8 chroma block

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dm_cfg_t     cfg;
  logic        blk_small;
  logic        pix_in_valid, pix_in_ready;
  word_t       pix_in_data;
  logic        bus_wr_valid, bus_wr_ready, bus_wr_last;
  word_t       bus_wr_data;
  logic        bus_rd_valid, bus_rd_ready;
  word_t       bus_rd_data;
  logic        pix_out_valid, pix_out_ready, pix_out_last;
  word_t       pix_out_data;
  logic        req_valid, req_hot, req_main;
  logic [24:0] req_addr, req_main_addr;
  logic [18:0] req_hot_addr;
  logic        swap_start, swap_busy, swap_done, swap_err;
  logic [2:0]  swap_n_refs;
  logic [24:0] swap_frame_base, swap_frame_words, swap_region_idx;
  logic [19:0] swap_region_words;
  logic [31:0] swap_words;
  logic        main_rd_valid, main_rd_ready, main_rsp_valid, hot_wr_en;
  logic [24:0] main_rd_addr;
  word_t       main_rsp_data, hot_wr_data;
  logic [18:0] hot_wr_addr;

  dram_image_codec_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- behavioural DRAM (both arrays, one address space) -----
  word_t dram [int];
  function automatic word_t rd_dram(int a);
    return dram.exists(a) ? dram[a] : '0;
  endfunction
  // main array read port for the swap controller: fixed one-cycle latency
  assign main_rd_ready = 1'b1;
  always @(posedge clk) begin
    main_rsp_valid <= main_rd_valid && main_rd_ready;
    main_rsp_data  <= rd_dram(int'(main_rd_addr));
    if (hot_wr_en) dram[HOT_BASE + int'(hot_wr_addr)] = hot_wr_data;
  end

  // ---------------- image ----------------
  logic [7:0] img [FH][FW];
  logic [7:0] cimg [FH/2][FW/2];                          // one chroma plane (4:2:0)
  function automatic word_t raster_word(int b, int k);   // block b, raster word k
    word_t w;
    int bx = (b % (FW / 16)) * 16, by = (b / (FW / 16)) * 16;
    int r = k / 2, s = k % 2;
    if (blk_small) begin                                  // 8x8 chroma block b
      for (int i = 0; i < 8; i++) w[8*i +: 8] = cimg[by / 2 + k][bx / 2 + i];
      return w;
    end
    for (int i = 0; i < 8; i++) w[8*i +: 8] = img[by + r][bx + 8*s + i];
    return w;
  endfunction
  function automatic int blk_words();
    return blk_small ? 8 : 32;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_wr_stall, n_rd_stall, n_pad_blocks, n_hot_req, n_main_req;
  int n_mode [16];

  // ---------------- transition statistics ----------------
  function automatic int self_tr(word_t a, word_t b);
    return $countones(a ^ b);
  endfunction
  function automatic int coup_tr(word_t a, word_t b);
    int c = 0;
    for (int i = 0; i < 63; i++) begin
      bit t0 = a[i] ^ b[i], t1 = a[i+1] ^ b[i+1];
      if (t0 != t1) c += 1;                                  // type II
      else if (t0 && t1 && (b[i] != b[i+1])) c += 2;         // type IV
    end
    return c;
  endfunction

  int self_cnt [16], coup_cnt [16], words_cnt [16];
  int base_self, base_coup;

  // ---------------- one block: write then read back ----------------
  task automatic check_req(int a);
    bit exp_hot;
    exp_hot = (a >= HOT_BASE) && (a < HOT_BASE + (1 << 19));
    req_valid = 1; req_addr = 25'(a);
    #0.1;
    check(req_hot == exp_hot && req_main == !exp_hot &&
          (!exp_hot || int'(req_hot_addr) == a - HOT_BASE), $sformatf("routing of %h", a));
    if (exp_hot) n_hot_req++; else n_main_req++;
    req_valid = 0;
  endtask

  word_t prev_w;
  bit    have_prev;

  // Expected first bus word of a block: scheduled word 0 is raster word 0,
  // then either the reference record's low 64 bits or per-lane Gray coding
  // and bit interleaving of the raw pixels.
  // Bits of the first bus word that belong to the block's first record.
  function automatic word_t first_mask();
    if (!cfg.comp_en || len_of(int'(cfg.qp)) >= 64) return '1;
    return (64'(1) << len_of(int'(cfg.qp))) - 64'(1);
  endfunction

  function automatic word_t first_bus_word(int b);
    word_t w, g, o;
    w = raster_word(b, 0);
    if (cfg.comp_en) return 64'(encode(w, int'(cfg.qp), cfg.gray_en)) & first_mask();
    for (int i = 0; i < 8; i++) g[i*8 +: 8] = cfg.gray_en ? (w[i*8 +: 8] ^ (w[i*8 +: 8] >> 1)) : w[i*8 +: 8];
    if (!cfg.ilv_en) return g;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) o[j*8 + i] = g[i*8 + j];
    return o;
  endfunction

  task automatic write_block(int b, int addr, int mode, output int nw);
    int sent, cnt;
    bit fin;
    sent = 0;
    fin = 0;
    cnt = 0;
    while (!fin) begin
      @(negedge clk);
      pix_in_valid = (sent < blk_words());
      pix_in_data  = raster_word(b, sent);
      bus_wr_ready = ($urandom % 4 != 0);
      #1;
      if (bus_wr_valid && !bus_wr_ready) n_wr_stall++;
      if (pix_in_valid && pix_in_ready) sent++;
      if (bus_wr_valid && bus_wr_ready) begin
        check_req(addr + cnt);
        if (cnt == 0)
          check((bus_wr_data & first_mask()) == first_bus_word(b),
                $sformatf("mode %0d block %0d first bus word %h expected %h",
                          mode, b, bus_wr_data, first_bus_word(b)));
        dram[addr + cnt] = bus_wr_data;
        if (have_prev) begin
          self_cnt[mode] += self_tr(prev_w, bus_wr_data);
          coup_cnt[mode] += coup_tr(prev_w, bus_wr_data);
        end
        prev_w = bus_wr_data; have_prev = 1;
        cnt++;
        fin = bus_wr_last;
      end
      if (cnt > 64) break;
    end
    nw = cnt;
    @(negedge clk);   // the edge that completes the last handshake
    pix_in_valid = 0;
    bus_wr_ready = 0;
  endtask

  task automatic read_block(int b, int addr, int nw, bit lossy, int q);
    int sent, got, cyc;
    sent = 0;
    got = 0;
    cyc = 0;
    while (got < blk_words() && cyc < 2000) begin
      @(negedge clk);
      bus_rd_valid  = (sent < nw);
      bus_rd_data   = rd_dram(addr + sent);
      pix_out_ready = ($urandom % 4 != 0);
      #1;
      cyc++;
      if (pix_out_valid && !pix_out_ready) n_rd_stall++;
      if (bus_rd_valid && bus_rd_ready) begin
        if (sent == 0) check_req(addr);
        sent++;
      end
      if (pix_out_valid && pix_out_ready) begin
        word_t e;
        e = raster_word(b, got);
        if (lossy) e = decode(encode(e, q, 1'b0), q, 1'b0);
        check(pix_out_data == e && pix_out_last == (got == blk_words() - 1),
              $sformatf("block %0d word %0d: %h expected %h", b, got, pix_out_data, e));
        got++;
      end
    end
    check(got == blk_words() && sent == nw, $sformatf("block %0d read %0d words, %0d out", b, sent, got));
    @(negedge clk);
    bus_rd_valid = 0;
    pix_out_ready = 0;
  endtask

  task automatic run_mode(int mode, bit comp, int q, bit gray, bit ilv, int base);
    int nw;
    @(negedge clk);
    cfg = '{comp_en: comp, qp: 2'(q), gray_en: gray, ilv_en: ilv};
    blk_small = (mode >= 12);
    have_prev = 0;
    for (int b = 0; b < NBLK; b++) begin
      write_block(b, base + 64 * b, mode, nw);
      words_cnt[mode] += nw;
      check(nw == (blk_small ? (comp ? CWORDS[q] : 8) : (comp ? WORDS[q] : 32)), $sformatf("mode %0d block %0d: %0d words", mode, b, nw));
      if (comp && (rec_len(2'(q)) * blk_words()) % 64 != 0) n_pad_blocks++;
      read_block(b, base + 64 * b, nw, comp && q != 0, q);
    end
    n_mode[mode]++;
  endtask

  initial begin
    int cyc;
    cfg = '0; blk_small = 0; pix_in_valid = 0; pix_in_data = '0; bus_wr_ready = 0; bus_rd_valid = 0;
    bus_rd_data = '0; pix_out_ready = 0; req_valid = 0; req_addr = '0; swap_start = 0;
    swap_n_refs = 0; swap_frame_base = 0; swap_frame_words = 0; swap_region_idx = 0;
    swap_region_words = 0;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int v, dx, dy;
        dx = x - 176; dy = y - 144;
        v = 30 + (x * 3) / 4 + y / 3;                          // lit background
        if (dx * dx + dy * dy < 60 * 60) v += 50 - (dx * dx + dy * dy) / 120; // face
        if (x >= 260 && x < 340 && y >= 20 && y < 120)            // textured patch
          v += ((x / 2 + y / 2) % 2) * 40;
        v += int'($urandom % 3);                                  // sensor noise
        img[y][x] = 8'((v > 255) ? 255 : v);
      end
    for (int y = 0; y < FH / 2; y++)                        // chroma: gentle gradient
      for (int x = 0; x < FW / 2; x++) cimg[y][x] = 8'(110 + x / 8 + y / 6 + int'($urandom % 2));
    // conventional transfer: raster order inside each block, plain binary
    begin
      word_t p;
      word_t w;
      bit hp;
      hp = 0;
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < 32; k++) begin
          w = raster_word(b, k);
          if (hp) begin base_self += self_tr(p, w); base_coup += coup_tr(p, w); end
          p = w; hp = 1;
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // raw pixels: scheduling always on; Gray / interleave combinations
    run_mode(0, 0, 0, 0, 0, MAIN_BASE);
    run_mode(1, 0, 0, 1, 0, MAIN_BASE);
    run_mode(2, 0, 0, 0, 1, HOT_BASE + 4096);
    run_mode(3, 0, 0, 1, 1, MAIN_BASE);
    // recompression, binary and Gray coded coefficients
    for (int q = 0; q < 4; q++) run_mode(4 + q, 1, q, 0, 0, MAIN_BASE);
    for (int q = 0; q < 4; q++) run_mode(8 + q, 1, q, 1, 0, MAIN_BASE);
    // 8x8 chroma blocks: raw Gray + interleave, QP 0, QP 1 Gray, QP 3
    run_mode(12, 0, 0, 1, 1, MAIN_BASE);
    run_mode(13, 1, 0, 0, 0, MAIN_BASE);
    run_mode(14, 1, 1, 1, 0, MAIN_BASE);
    run_mode(15, 1, 3, 0, 0, MAIN_BASE);
    @(negedge clk);
    blk_small = 0;

    $display("conventional: self %0d coupling %0d", base_self, base_coup);
    for (int m = 0; m < 12; m++)
      $display("mode %2d: words %6d self %8d (%5.1f%%) coupling %8d (%5.1f%%)", m, words_cnt[m],
               self_cnt[m], 100.0 * (base_self - self_cnt[m]) / base_self,
               coup_cnt[m], 100.0 * (base_coup - coup_cnt[m]) / base_coup);
    for (int m = 12; m < 16; m++)     // chroma plane: no conventional count to compare with
      $display("mode %2d (chroma): words %6d self %8d coupling %8d", m, words_cnt[m],
               self_cnt[m], coup_cnt[m]);
    check(self_cnt[0] < base_self, "scheduling lowers self transitions");
    check(self_cnt[1] < self_cnt[0], "Gray coding lowers self transitions further");
    check(words_cnt[0] == 32 * NBLK && words_cnt[4] == 38 * NBLK && words_cnt[7] == 25 * NBLK,
          "words per frame");
    check(n_wr_stall > 0, "DRAM back-pressure happened");
    check(n_rd_stall > 0, "read-side stalls happened");
    check(n_pad_blocks > 0, "padded final word happened");
    check(n_hot_req > 0 && n_main_req > 0, "hot and main requests happened");
    for (int m = 0; m < 16; m++) check(n_mode[m] == 1, $sformatf("mode %0d ran", m));
    $display("stalls wr %0d rd %0d, padded blocks %0d, hot req %0d, main req %0d",
             n_wr_stall, n_rd_stall, n_pad_blocks, n_hot_req, n_main_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

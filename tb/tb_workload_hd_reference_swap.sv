// tb_workload_hd_reference_swap: 1080p multi-reference-frame workload for the
// hot data swap of dram_image_codec_top.
//
// Each 1080p reference frame with its chroma takes 24 Mb, i.e. 393,216 words
// of 64 bits; 1 to 5 reference frames lie back to back in the 2 Gb main
// array. Four copies of the top run side by side, with hot data zones of
// 8 Mb, 16 Mb, 24 Mb and the default 32 Mb (HOT_AW = 17, 18, 19, 19; the
// 24 Mb zone uses HOT_WORDS = 393,216 in a 2^19-word window; each window at
// the top of the address space). For every zone and every number of
// reference frames m the testbench walks the whole frame region by region,
// as a decoder would: region size R = min(frame, zone / m), and for each
// region one swap brings that region of all m frames into the hot zone. The
// last, shorter region is requested with its own base and size. Every word
// written into the hot zone is checked against the main-array word it must
// come from, each swap must end with done and without err, and the swap word
// counter must match. One request that does not fit must be refused.
//
// The testbench prints the words moved per configuration next to the
// data volume that the swap-energy estimate of the source method charges
// (twice the reference data exceeding the hot zone). This controller only
// copies into the zone, so it moves m * frame words once, which includes
// the initial load. The main array answers without stalls to keep the
// simulation short; back-pressure is covered by the block's own test.
module tb_workload_hd_reference_swap;
  import dm_pkg::*;

  localparam int AW     = 25;          // 2 Gb in 64-bit words
  localparam int FRAME  = 393216;      // 24 Mb per 1080p reference frame
  localparam int NZONE  = 4;
  localparam int MAXREF = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swaps = 0, n_partial = 0, n_refused = 0, n_fullframe = 0;
  longint moved [NZONE][MAXREF+1];
  bit zone_done [NZONE];
  int zone_words [NZONE];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [63:0] content(logic [AW-1:0] a);
    return {32'(a) * 32'h9E37_79B9, 32'(a) ^ 32'hA5A5_0000};
  endfunction

  for (genvar z = 0; z < NZONE; z++) begin : g_zone
    localparam int unsigned HAW  = (z < 2) ? 17 + z : 19;
    localparam logic [24:0] BASE = 25'((33'(1) << AW) - (33'(1) << HAW));
    localparam int          HOTW = (z == 2) ? 393216 : 1 << HAW;

    dm_cfg_t            cfg;
    logic               pix_in_valid, pix_in_ready, bus_wr_valid, bus_wr_last;
    logic               bus_rd_valid, bus_rd_ready, pix_out_valid, pix_out_last;
    word_t              pix_in_data, bus_wr_data, bus_rd_data, pix_out_data;
    logic               req_valid, req_hot, req_main;
    logic [AW-1:0]      req_addr, req_main_addr;
    logic [HAW-1:0]     req_hot_addr;
    logic               swap_start, swap_busy, swap_done, swap_err;
    logic [2:0]         swap_n_refs;
    logic [AW-1:0]      swap_frame_base, swap_frame_words, swap_region_idx;
    logic [HAW:0]       swap_region_words;
    logic [31:0]        swap_words;
    logic               main_rd_valid, main_rd_ready, main_rsp_valid, hot_wr_en;
    logic [AW-1:0]      main_rd_addr;
    word_t              main_rsp_data, hot_wr_data;
    logic [HAW-1:0]     hot_wr_addr;

    // expectation for the swap in flight
    int exp_base, exp_r;
    int n_wr;

    dram_image_codec_top #(.HOT_AW(HAW), .HOT_BASE(BASE), .HOT_WORDS(HOTW)) dut (
      .clk, .rst_n, .cfg, .blk_small(1'b0),
      .pix_in_valid, .pix_in_ready, .pix_in_data,
      .bus_wr_valid, .bus_wr_ready(1'b1), .bus_wr_data, .bus_wr_last,
      .bus_rd_valid, .bus_rd_ready, .bus_rd_data,
      .pix_out_valid, .pix_out_ready(1'b1), .pix_out_data, .pix_out_last,
      .req_valid, .req_addr, .req_hot, .req_main, .req_hot_addr, .req_main_addr,
      .swap_start, .swap_n_refs, .swap_frame_base, .swap_frame_words,
      .swap_region_idx, .swap_region_words, .swap_busy, .swap_done, .swap_err,
      .swap_words, .main_rd_valid, .main_rd_ready, .main_rd_addr,
      .main_rsp_valid, .main_rsp_data, .hot_wr_en, .hot_wr_addr, .hot_wr_data);

    main_array_model #(.ADDR_W(AW), .STALL(1'b0)) u_main (
      .clk, .rd_valid(main_rd_valid), .rd_ready(main_rd_ready), .rd_addr(main_rd_addr),
      .rsp_valid(main_rsp_valid), .rsp_data(main_rsp_data));

    // hot slot f*R + w must hold word w of the region in frame f
    always @(posedge clk) if (hot_wr_en) begin
      int f, w;
      f = int'(hot_wr_addr) / exp_r;
      w = int'(hot_wr_addr) % exp_r;
      n_wr++;
      if (hot_wr_data != content(AW'(exp_base + f * FRAME + w)) || int'(hot_wr_addr) >= HOTW)
        check(0, $sformatf("zone %0d hot word %0d", z, hot_wr_addr));
      else checks++;
    end

    task automatic do_swap(int m, int base, int r, bit expect_err);
      int cyc, w0;
      @(negedge clk);
      exp_base = base; exp_r = r; n_wr = 0; w0 = int'(swap_words);
      swap_n_refs = 3'(m); swap_frame_base = AW'(base); swap_frame_words = AW'(FRAME);
      swap_region_idx = '0; swap_region_words = (HAW+1)'(r); swap_start = 1;
      @(negedge clk);
      swap_start = 0;
      cyc = 0;
      while (!swap_done && cyc < m * r + 100) begin @(negedge clk); cyc++; end
      if (expect_err) begin
        check(swap_err && n_wr == 0, $sformatf("zone %0d: oversize swap refused", z));
        n_refused++;
      end else begin
        check(swap_done && !swap_err && n_wr == m * r && int'(swap_words) - w0 == m * r,
              $sformatf("zone %0d m %0d base %0d: %0d words written", z, m, base, n_wr));
        n_swaps++;
      end
    endtask

    initial begin
      int r, off;
      cfg = '0; pix_in_valid = 0; pix_in_data = '0; bus_rd_valid = 0; bus_rd_data = '0;
      req_valid = 0; req_addr = '0; swap_start = 0; swap_n_refs = 0; swap_frame_base = '0;
      swap_frame_words = '0; swap_region_idx = '0; swap_region_words = '0;
      exp_base = 0; exp_r = 1; n_wr = 0; zone_words[z] = HOTW;
      @(posedge rst_n);
      for (int m = 1; m <= MAXREF; m++) begin
        r = (HOTW / m < FRAME) ? HOTW / m : FRAME;
        if (r == FRAME) n_fullframe++;
        moved[z][m] = 0;
        // region by region over the whole frame: region k starts at k*r
        for (off = 0; off < FRAME; off += r) begin
          int len;
          len = (FRAME - off < r) ? FRAME - off : r;
          if (len < r) n_partial++;
          do_swap(m, off, len, 1'b0);
          moved[z][m] += longint'(m) * len;
        end
      end
      // one more word per frame than fits must be refused
      do_swap(MAXREF, 0, HOTW / MAXREF + 1, 1'b1);
      zone_done[z] = 1;
    end
  end

  initial begin
    for (int z = 0; z < NZONE; z++) zone_done[z] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (zone_done[0] && zone_done[1] && zone_done[2] && zone_done[3]);
    for (int z = 0; z < NZONE; z++)
      for (int m = 1; m <= MAXREF; m++) begin
        longint c, eq;
        c  = longint'(zone_words[z]);
        eq = (longint'(m) * FRAME > c) ? 2 * (longint'(m) * FRAME - c) : 0;
        $display("hot zone %0d Mb, %0d reference frames: %0d words swapped in (estimate charges %0d)",
                 zone_words[z] / 16384, m, moved[z][m], eq);
        check(moved[z][m] == longint'(m) * FRAME, "every reference word moved once");
      end
    $display("swaps %0d, partial last regions %0d, refused %0d, whole-frame regions %0d",
             n_swaps, n_partial, n_refused, n_fullframe);
    check(n_swaps > 0, "swaps happened");
    check(n_partial > 0, "partial last region happened");
    check(n_refused == NZONE, "oversize request refused in every zone");
    check(n_fullframe > 0, "a whole frame fitted in one region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: the longest zone moves 15 frames of words plus small overheads
  initial begin
    repeat (15 * FRAME + 400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

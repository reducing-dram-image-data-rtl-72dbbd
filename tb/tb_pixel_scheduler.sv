// tb_pixel_scheduler: self-checking test of pixel_scheduler in both
// directions, at the default 16x16 block on a 64-bit bus.
//
// Pixel n of the block (n = row*16 + column, as P0..P255 in raster order)
// holds the value n. The write-direction instance gets raster words and must
// send P0-P7, P16-P23, ... P240-P247, then P8-P15, P24-P31, ...; the
// read-direction instance gets that scheduled stream and must give raster
// order back. Both run with random stalls on the input and output side; an
// unstalled block must take 32 fill cycles and 32 drain cycles. 8x8 chroma
// blocks (small_blk) are one strip wide, so they must keep raster order and
// fill in 8 cycles; a 16x16 block after them must be scheduled again.
module tb_pixel_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tx_iv, tx_ir, tx_ov, tx_or, tx_last;
  logic [63:0] tx_id, tx_od;
  logic        rx_iv, rx_ir, rx_ov, rx_or, rx_last;
  logic [63:0] rx_id, rx_od;
  logic        sml;
  int checks = 0, failures = 0;

  pixel_scheduler #(.TO_BUS(1'b1)) u_tx (
    .clk, .rst_n, .small_blk(sml), .in_valid(tx_iv), .in_ready(tx_ir), .in_data(tx_id),
    .out_valid(tx_ov), .out_ready(tx_or), .out_data(tx_od), .out_last(tx_last));
  pixel_scheduler #(.TO_BUS(1'b0)) u_rx (
    .clk, .rst_n, .small_blk(sml), .in_valid(rx_iv), .in_ready(rx_ir), .in_data(rx_id),
    .out_valid(rx_ov), .out_ready(rx_or), .out_data(rx_od), .out_last(rx_last));

  // Word holding pixels first..first+7 with value = pixel number + offset.
  function automatic logic [63:0] word_of(int first, int off);
    logic [63:0] w;
    for (int i = 0; i < 8; i++) w[8*i +: 8] = 8'(first + i + off);
    return w;
  endfunction
  // First pixel of scheduled word k. A 16x16 block: two strips, each top
  // to bottom. An 8x8 block (pixels numbered row*8 + column): one strip, so
  // word k is row k.
  function automatic int sched_first(int k);
    return sml ? 8 * k : (k % 16) * 16 + (k / 16) * 8;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // One block through both instances, the tx output checked and fed to rx.
  task automatic run_block(int off, bit stall, bit sm);
    int k_in, k_tx, k_rx, t0, t_fill, nw;
    @(negedge clk);
    sml = sm;
    nw = sm ? 8 : 32;
    k_in = 0; k_tx = 0; k_rx = 0;
    t0 = 0; t_fill = 0;
    while (k_rx < nw) begin
      @(negedge clk);
      tx_iv = (k_in < nw) && (!stall || ($urandom % 4 != 0));
      tx_id = word_of(8 * k_in, off);
      tx_or = !stall || ($urandom % 3 != 0);
      rx_or = !stall || ($urandom % 3 != 0);
      #1;
      // handshakes that the next rising edge will complete
      if (tx_iv && tx_ir) k_in++;
      if (tx_ov && tx_or) begin
        if (k_tx == 0) t_fill = t0;
        check(tx_od == word_of(sched_first(k_tx), off),
              $sformatf("tx word %0d = %h", k_tx, tx_od));
        check(tx_last == (k_tx == nw - 1), "tx last flag");
        k_tx++;
      end
      if (rx_ov && rx_or) begin
        check(rx_od == word_of(8 * k_rx, off), $sformatf("rx word %0d = %h", k_rx, rx_od));
        check(rx_last == (k_rx == nw - 1), "rx last flag");
        k_rx++;
      end
      t0++;
      if (t0 > 2000) break;
    end
    if (!stall) check(t_fill == nw, $sformatf("fill took %0d cycles", t_fill));
    // the edge that completes the last handshake, before the next block
    @(negedge clk);
    tx_iv = 0; tx_or = 0; rx_or = 0;
  endtask

  // tx and rx are chained through a sml queue so each keeps its own stalls.
  logic [63:0] q[$];
  always @(posedge clk) begin
    if (tx_ov && tx_or) q.push_back(tx_od);
    if (rx_iv && rx_ir) void'(q.pop_front());
  end
  always_comb begin
    rx_iv = (q.size() > 0);
    rx_id = (q.size() > 0) ? q[0] : '0;
  end

  initial begin
    tx_iv = 0; tx_or = 0; rx_or = 0; tx_id = '0; sml = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(0, 1'b0, 1'b0);
    run_block(37, 1'b1, 1'b0);
    run_block(5, 1'b0, 1'b1);      // 8x8 chroma blocks
    run_block(60, 1'b1, 1'b1);
    run_block(100, 1'b1, 1'b0);    // back to a 16x16 block
    check(checks >= 3 * 32 * 4 + 2 * 8 * 4, "enough words were checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

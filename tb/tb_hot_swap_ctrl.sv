// tb_hot_swap_ctrl: self-checking test of hot_swap_ctrl with a small address
// space (2^14-word main array, 2^8-word hot zone) and a behavioural main array
// with random back-pressure and latency. Brings region r of n reference frames
// into the hot zone and checks every hot zone word against the main array
// word it must have come from, the swap word counter and the error response
// to regions that do not fit.
module tb_hot_swap_ctrl;
  localparam int AW = 14, HW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, err;
  logic [2:0]    n_refs;
  logic [AW-1:0] frame_base, frame_words, region_idx;
  logic [HW:0]   region_words;
  logic          rd_valid, rd_ready, rsp_valid, hot_wr_en;
  logic [AW-1:0] rd_addr;
  logic [63:0]   rsp_data, hot_wr_data;
  logic [HW-1:0] hot_wr_addr;
  logic [31:0]   swap_words;
  logic [63:0]   hot [2**HW];
  int checks = 0, failures = 0;

  hot_swap_ctrl #(.ADDR_W(AW), .HOT_AW(HW)) dut (
    .clk, .rst_n, .start, .n_refs, .frame_base, .frame_words, .region_idx, .region_words,
    .busy, .done, .err, .main_rd_valid(rd_valid), .main_rd_ready(rd_ready),
    .main_rd_addr(rd_addr), .main_rsp_valid(rsp_valid), .main_rsp_data(rsp_data),
    .hot_wr_en, .hot_wr_addr, .hot_wr_data, .swap_words);

  main_array_model #(.ADDR_W(AW)) u_main (
    .clk, .rd_valid, .rd_ready, .rd_addr, .rsp_valid, .rsp_data);

  always @(posedge clk) if (hot_wr_en) hot[hot_wr_addr] <= hot_wr_data;

  function automatic logic [63:0] content(int a);
    return {32'(a) * 32'h9E37_79B9, 32'(a) ^ 32'hA5A5_0000};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic swap(int n, int base, int fw, int r, int rw, output int cycles);
    @(negedge clk);
    n_refs = 3'(n); frame_base = AW'(base); frame_words = AW'(fw);
    region_idx = AW'(r); region_words = (HW+1)'(rw); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, prev_words;
    start = 0; n_refs = 0; frame_base = 0; frame_words = 0; region_idx = 0; region_words = 0;
    for (int i = 0; i < 2**HW; i++) hot[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // three frames of 2048 words, region 2 of 64 words each
    swap(3, 100, 2048, 2, 64, cyc);
    check(!err, "no error");
    for (int f = 0; f < 3; f++)
      for (int w = 0; w < 64; w++)
        check(hot[f*64 + w] == content(100 + f*2048 + 2*64 + w),
              $sformatf("frame %0d word %0d", f, w));
    check(swap_words == 192, $sformatf("swap_words %0d", swap_words));
    // a region that fills the whole hot zone: 4 frames x 64 words
    swap(4, 0, 4096, 5, 64, cyc);
    check(!err, "no error at full hot zone");
    for (int w = 0; w < 256; w++)
      check(hot[w] == content((w / 64) * 4096 + 5 * 64 + (w % 64)), $sformatf("full word %0d", w));
    // does not fit: 5 x 64 > 256
    prev_words = swap_words;
    swap(5, 0, 4096, 0, 64, cyc);
    check(err && swap_words == prev_words && cyc < 4, "oversize request rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

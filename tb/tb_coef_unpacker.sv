// tb_coef_unpacker: self-checking test of coef_unpacker.
// Blocks of 32 random records of 76, 64, 57 and 50 bits are packed by the
// testbench into 64-bit words (LSB first, last word zero padded) and fed in
// under random stalls; every record, the last-record flag and the dropping
// of the padding (the next block must start clean) are checked, as is one
// record per cycle for 64-bit records. Blocks of 8 records (small_blk, an
// 8x8 chroma block) are mixed in.
module tb_coef_unpacker;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iv, ir, ov, ordy, ol;
  logic [6:0]  ilen;
  logic        sml;
  logic [63:0] id;
  logic [75:0] orec;
  int checks = 0, failures = 0;

  coef_unpacker dut (.clk, .rst_n, .in_len(ilen), .small_blk(sml), .in_valid(iv), .in_ready(ir),
    .in_data(id), .out_valid(ov), .out_ready(ordy), .out_rec(orec), .out_last(ol));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int LENS [4] = '{76, 64, 57, 50};

  task automatic run_block(int q, bit stall, output int cycles, input bit sm = 1'b0);
    logic [75:0] recs[32];
    logic [63:0] words[$];
    bit          bits[$];
    int sent, got, nrec;
    sent = 0;
    got = 0;
    nrec = sm ? 8 : 32;
    @(negedge clk);   // let the previous block's last handshake complete
    ilen = 7'(LENS[q]);
    sml = sm;
    for (int r = 0; r < nrec; r++) begin
      recs[r] = {12'($urandom), $urandom, $urandom} & ((76'(1) << LENS[q]) - 1);
      for (int b = 0; b < LENS[q]; b++) bits.push_back(recs[r][b]);
    end
    // padding made of ones, so a unpacker that keeps it is caught
    while (bits.size() % 64 != 0) bits.push_back(1'b1);
    while (bits.size() > 0) begin
      logic [63:0] w;
      for (int b = 0; b < 64; b++) w[b] = bits.pop_front();
      words.push_back(w);
    end
    cycles = 0;
    while (got < nrec) begin
      @(negedge clk);
      iv = (sent < words.size()) && (!stall || ($urandom % 3 != 0));
      id = (sent < words.size()) ? words[sent] : '0;
      ordy = !stall || ($urandom % 3 != 0);
      #1;
      cycles++;
      if (ov && ordy) begin
        check(orec == recs[got] && ol == (got == nrec - 1),
              $sformatf("len %0d rec %0d = %h exp %h", LENS[q], got, orec, recs[got]));
        got++;
      end
      if (iv && ir) sent++;
      if (cycles > 1000) break;
    end
    check(sent == words.size(), $sformatf("len %0d: %0d of %0d words taken", LENS[q], sent, words.size()));
  endtask

  initial begin
    int cyc;
    iv = 0; ordy = 0; id = '0; ilen = 64; sml = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(1, 1'b0, cyc);
    check(cyc <= 34, $sformatf("64-bit records: %0d cycles for 32 records", cyc));
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 4; q++) begin
        run_block(q, 1'b0, cyc);
        run_block(q, 1'b1, cyc);
        run_block(q, 1'b1, cyc, 1'b1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_coef_packer: self-checking test of coef_packer.
// Blocks of 32 random records of 76, 64, 57 and 50 bits (the record lengths
// for QP 0..3) are packed under random stalls. The expected words are built
// from a bit queue: records appended LSB first, the last word of a block
// padded with zeros. Checks every word, the last-word flag, the word count
// per block (38, 32, 29, 25) and one record per cycle for 64-bit records.
module tb_coef_packer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iv, ir, il, ov, ordy, ol;
  logic [75:0] irec;
  logic [6:0]  ilen;
  logic [63:0] od;
  int checks = 0, failures = 0;

  coef_packer dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_rec(irec),
    .in_len(ilen), .in_last(il), .out_valid(ov), .out_ready(ordy), .out_data(od),
    .out_last(ol));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int LENS [4] = '{76, 64, 57, 50};
  localparam int WORDS [4] = '{38, 32, 29, 25};

  bit          bits[$];
  logic [64:0] exp_q[$];   // {last, word}

  task automatic run_block(int q, bit stall, output int cycles);
    int sent = 0, got = 0, nexp;
    nexp = WORDS[q];
    ilen = 7'(LENS[q]);
    cycles = 0;
    while (got < nexp) begin
      @(negedge clk);
      iv = (sent < 32) && (!stall || ($urandom % 3 != 0));
      irec = {12'($urandom), $urandom, $urandom};
      il = (sent == 31);
      ordy = !stall || ($urandom % 3 != 0);
      #1;
      cycles++;
      if (ov && ordy) begin
        check(exp_q.size() > 0 && {ol, od} == exp_q[0],
              $sformatf("len %0d word %0d = %h exp %h", LENS[q], got, od,
                        exp_q.size() > 0 ? exp_q[0][63:0] : '0));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        got++;
      end
      if (iv && ir) begin
        for (int b = 0; b < LENS[q]; b++) bits.push_back(irec[b]);
        if (il) while (bits.size() % 64 != 0) bits.push_back(1'b0);
        while (bits.size() >= 64) begin
          logic [63:0] w;
          for (int b = 0; b < 64; b++) w[b] = bits.pop_front();
          exp_q.push_back({(il && bits.size() == 0), w});
        end
        sent++;
      end
      if (cycles > 1000) break;
    end
    check(got == nexp && exp_q.size() == 0, $sformatf("len %0d: %0d words", LENS[q], got));
  endtask

  initial begin
    int cyc;
    iv = 0; ordy = 0; irec = '0; il = 0; ilen = 64;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(1, 1'b0, cyc);
    check(cyc <= 34, $sformatf("64-bit records: %0d cycles for 32 words", cyc));
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 4; q++) begin
        run_block(q, 1'b0, cyc);
        run_block(q, 1'b1, cyc);
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

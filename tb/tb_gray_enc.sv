// tb_gray_enc: self-checking test of gray_enc.
// Compares every lane with b ^ (b >> 1) for random words and for all 256
// values of one lane, and checks that consecutive values give Gray codes
// one bit apart (the property that cuts self transitions).
module tb_gray_enc;
  logic [63:0] bin, gray;
  int checks = 0, failures = 0;

  gray_enc dut (.bin_i(bin), .gray_o(gray));

  function automatic logic [63:0] ref_gray(logic [63:0] b);
    logic [63:0] r;
    for (int l = 0; l < 8; l++) begin
      logic [7:0] v;
      v = b[8*l +: 8];
      r[8*l +: 8] = v ^ (v >> 1);
    end
    return r;
  endfunction

  initial begin
    logic [7:0] prev;
    for (int n = 0; n < 2000; n++) begin
      bin = {$urandom, $urandom};
      #1;
      checks++;
      if (gray !== ref_gray(bin)) begin
        failures++;
        $display("FAIL bin=%h gray=%h exp=%h", bin, gray, ref_gray(bin));
      end
    end
    // Adjacent values differ in exactly one Gray bit.
    bin = '0; #1; prev = gray[7:0];
    for (int v = 1; v < 256; v++) begin
      bin = {8{8'(v)}}; #1;
      checks++;
      if ($countones(gray[7:0] ^ prev) != 1) begin
        failures++;
        $display("FAIL v=%0d not one bit from previous", v);
      end
      prev = gray[7:0];
    end
    // A known value: 0x80 -> 0xC0, 0x7F -> 0x40.
    bin = 64'h7F80_7F80_7F80_7F80; #1;
    checks++;
    if (gray !== 64'h40C0_40C0_40C0_40C0) begin failures++; $display("FAIL known %h", gray); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gray_dec: self-checking test of gray_dec.
// The expected binary value of each lane is the XOR of all right shifts of
// its Gray code (a different formulation of the prefix XOR), checked on
// random words and on a few known values.
module tb_gray_dec;
  logic [63:0] gray, bin;
  int checks = 0, failures = 0;

  gray_dec dut (.gray_i(gray), .bin_o(bin));

  function automatic logic [63:0] ref_bin(logic [63:0] g);
    logic [63:0] r;
    for (int l = 0; l < 8; l++) begin
      logic [7:0] v, acc;
      v = g[8*l +: 8];
      acc = '0;
      for (int s = 0; s < 8; s++) acc ^= (v >> s);
      r[8*l +: 8] = acc;
    end
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      gray = {$urandom, $urandom};
      #1;
      checks++;
      if (bin !== ref_bin(gray)) begin
        failures++;
        $display("FAIL gray=%h bin=%h exp=%h", gray, bin, ref_bin(gray));
      end
    end
    gray = 64'h40C0_40C0_40C0_40C0; #1;
    checks++;
    if (bin !== 64'h7F80_7F80_7F80_7F80) begin failures++; $display("FAIL known %h", bin); end
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

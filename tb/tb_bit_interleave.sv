// tb_bit_interleave: self-checking test of bit_interleave.
// Expected output is built wire by wire: output wire o carries bit o/8 of
// pixel o%8. Also checks that a pixel of all ones lands on every eighth wire
// and that the coupling activity of a smooth 8-pixel sequence drops.
module tb_bit_interleave;
  logic [63:0] pix, ilv;
  int checks = 0, failures = 0;

  bit_interleave dut (.pix_i(pix), .ilv_o(ilv));

  function automatic logic [63:0] ref_ilv(logic [63:0] p);
    logic [63:0] r;
    for (int o = 0; o < 64; o++) r[o] = p[(o % 8) * 8 + (o / 8)];
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      pix = {$urandom, $urandom};
      #1;
      checks++;
      if (ilv !== ref_ilv(pix)) begin
        failures++;
        $display("FAIL pix=%h ilv=%h exp=%h", pix, ilv, ref_ilv(pix));
      end
    end
    pix = 64'h0000_0000_0000_00FF; #1;
    checks++;
    if (ilv !== 64'h0101_0101_0101_0101) begin failures++; $display("FAIL p0 %h", ilv); end
    pix = 64'h8000_0000_0000_0000; #1;   // bit 7 of pixel 7 -> top wire
    checks++;
    if (ilv !== 64'h8000_0000_0000_0000) begin failures++; $display("FAIL p7b7 %h", ilv); end
    pix = 64'h0000_0000_0000_0100; #1;   // bit 0 of pixel 1 -> wire 1
    checks++;
    if (ilv !== 64'h0000_0000_0000_0002) begin failures++; $display("FAIL p1b0 %h", ilv); end
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

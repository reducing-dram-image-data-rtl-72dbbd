// tb_bit_deinterleave: self-checking test of bit_deinterleave.
// Expected pixel bit j of pixel i is input wire j*8 + i; checks random words
// and known single-pixel patterns.
module tb_bit_deinterleave;
  logic [63:0] ilv, pix;
  int checks = 0, failures = 0;

  bit_deinterleave dut (.ilv_i(ilv), .pix_o(pix));

  function automatic logic [63:0] ref_pix(logic [63:0] w);
    logic [63:0] r;
    for (int b = 0; b < 64; b++) r[b] = w[(b % 8) * 8 + (b / 8)];
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      ilv = {$urandom, $urandom};
      #1;
      checks++;
      if (pix !== ref_pix(ilv)) begin
        failures++;
        $display("FAIL ilv=%h pix=%h exp=%h", ilv, pix, ref_pix(ilv));
      end
    end
    ilv = 64'h0101_0101_0101_0101; #1;
    checks++;
    if (pix !== 64'h0000_0000_0000_00FF) begin failures++; $display("FAIL p0 %h", pix); end
    ilv = 64'h0000_0000_0000_0002; #1;
    checks++;
    if (pix !== 64'h0000_0000_0000_0100) begin failures++; $display("FAIL p1b0 %h", pix); end
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

// tb_hot_zone_decoder: self-checking test of hot_zone_decoder at its default
// size (2^25-word device, 2^19-word hot data zone at the top) and, in a second
// instance, with a 24 Mb zone (393,216 words) in the same aligned window.
// Expected routing is a plain range comparison, base <= addr < base + size,
// checked at the window edges, at random addresses and with req_valid low.
module tb_hot_zone_decoder;
  localparam int unsigned BASE  = 32'h01F8_0000;
  localparam int unsigned SIZE  = 1 << 19;
  localparam int unsigned SIZE2 = 393216;        // 24 Mb of 64-bit words
  logic        req_valid, hot_sel, main_sel, hot_sel2, main_sel2;
  logic [24:0] req_addr, main_addr, main_addr2;
  logic [18:0] hot_addr, hot_addr2;
  int checks = 0, failures = 0;

  hot_zone_decoder dut (.req_valid, .req_addr, .hot_sel, .main_sel, .hot_addr, .main_addr);

  hot_zone_decoder #(.HOT_WORDS(SIZE2)) dut24 (
    .req_valid, .req_addr, .hot_sel(hot_sel2), .main_sel(main_sel2),
    .hot_addr(hot_addr2), .main_addr(main_addr2));

  task automatic try(logic [24:0] a, bit v);
    bit in_hot, in_hot2;
    req_addr = a; req_valid = v;
    #1;
    in_hot  = (int'(a) >= BASE) && (int'(a) < BASE + SIZE);
    in_hot2 = (int'(a) >= BASE) && (int'(a) < BASE + SIZE2);
    checks += 2;
    if (hot_sel !== (v && in_hot) || main_sel !== (v && !in_hot) ||
        (in_hot && hot_addr !== 19'(int'(a) - BASE)) || main_addr !== a) begin
      failures++;
      $display("FAIL addr=%h v=%0d hot=%0d main=%0d off=%h", a, v, hot_sel, main_sel, hot_addr);
    end
    if (hot_sel2 !== (v && in_hot2) || main_sel2 !== (v && !in_hot2) ||
        (in_hot2 && hot_addr2 !== 19'(int'(a) - BASE)) || main_addr2 !== a) begin
      failures++;
      $display("FAIL 24Mb addr=%h v=%0d hot=%0d main=%0d off=%h", a, v, hot_sel2, main_sel2, hot_addr2);
    end
  endtask

  initial begin
    try(25'(BASE), 1); try(25'(BASE + SIZE - 1), 1); try(25'(BASE - 1), 1);
    try(25'(BASE + SIZE2 - 1), 1); try(25'(BASE + SIZE2), 1);
    try(25'h0, 1); try(25'h1FF_FFFF, 1); try(25'(BASE + 5), 0);
    for (int n = 0; n < 2000; n++) try(25'($urandom), 1);
    for (int n = 0; n < 500; n++) try(25'(BASE + ($urandom % SIZE)), 1);
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

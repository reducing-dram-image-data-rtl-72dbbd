// tb_bus_decoder: self-checking test of bus_decoder.
// Streams random words through the stage under all four gray_en / ilv_en
// settings with random input gaps and output stalls. Expected words come
// from a reference model written bit by bit in this testbench; order,
// 'last' flags and the one-cycle latency of an unstalled word are checked.
module tb_bus_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        gray_en, ilv_en;
  logic        iv, ir, il, ov, ordy, ol;
  logic [63:0] id, od;
  int checks = 0, failures = 0;

  bus_decoder dut (.clk, .rst_n, .gray_en, .ilv_en,
    .in_valid(iv), .in_ready(ir), .in_data(id), .in_last(il),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol));

  function automatic logic [63:0] gray8(logic [63:0] b);
    logic [63:0] r;
    for (int l = 0; l < 8; l++) r[8*l +: 8] = b[8*l +: 8] ^ (b[8*l +: 8] >> 1);
    return r;
  endfunction
  function automatic logic [63:0] bin8(logic [63:0] g);
    logic [63:0] r;
    for (int l = 0; l < 8; l++)
      for (int i = 0; i < 8; i++) r[8*l+i] = ^(g[8*l +: 8] >> i);
    return r;
  endfunction
  function automatic logic [63:0] ilv(logic [63:0] p);
    logic [63:0] r;
    for (int o = 0; o < 64; o++) r[o] = p[(o % 8) * 8 + (o / 8)];
    return r;
  endfunction
  function automatic logic [63:0] dil(logic [63:0] w);
    logic [63:0] r;
    for (int o = 0; o < 64; o++) r[(o % 8) * 8 + (o / 8)] = w[o];
    return r;
  endfunction
  function automatic logic [63:0] model(logic [63:0] w, bit g, bit i);
    logic [63:0] r;
    if ("dec" == "enc") begin
      r = g ? gray8(w) : w;
      r = i ? ilv(r) : r;
    end else begin
      r = i ? dil(w) : w;
      r = g ? bin8(r) : r;
    end
    return r;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [64:0] exp_q[$];

  task automatic run(bit g, bit i, int n, bit stall);
    int sent, got;
    sent = 0; got = 0;
    gray_en = g; ilv_en = i;
    while (got < n) begin
      @(negedge clk);
      iv = (sent < n) && (!stall || ($urandom % 3 != 0));
      id = {$urandom, $urandom};
      il = (sent == n - 1);
      ordy = !stall || ($urandom % 3 != 0);
      #1;
      if (ov && ordy) begin
        check(exp_q.size() > 0 && {ol, od} == exp_q[0],
              $sformatf("g=%0d i=%0d word %0d = %h", g, i, got, od));
        void'(exp_q.pop_front());
        got++;
      end
      if (iv && ir) begin
        exp_q.push_back({sent == n - 1, model(id, g, i)});
        sent++;
      end
    end
  endtask

  initial begin
    iv = 0; ordy = 0; id = '0; il = 0; gray_en = 0; ilv_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: a word presented at one edge is valid at the output after it
    @(negedge clk);
    gray_en = 1; ilv_en = 1; iv = 1; id = 64'h0123_4567_89AB_CDEF; il = 1; ordy = 1;
    @(negedge clk);
    iv = 0;
    check(ov && od == model(64'h0123_4567_89AB_CDEF, 1, 1) && ol, "one-cycle latency");
    @(negedge clk);
    check(!ov, "output empties");
    for (int m = 0; m < 4; m++) begin
      run(m[1], m[0], 200, 1'b0);
      run(m[1], m[0], 200, 1'b1);
    end
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

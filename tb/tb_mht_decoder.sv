// tb_mht_decoder: self-checking test of mht_decoder.
// Random and smooth pixel groups go through the block for every QP, with
// Gray coding on and off and with recompression off; results are compared
// with the integer reference model of mht_ref_pkg, under random stalls.
// Hand-worked values: the group 10,12,10,12,... gives Y0 = 11, Y1 = -2 and
// all other coefficients 0, so at QP 1 the record is 0xFF0B (0x800E Gray
// coded), and that record decodes to 11,12,11,12,...
module tb_mht_decoder;
  import mht_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        comp_en, gray_en;
  logic [1:0]  qp;
  logic        iv, ir, il, ov, ordy, ol;
  int checks = 0, failures = 0;
  logic [75:0] id;
  logic [63:0] od;

  mht_decoder dut (.clk, .rst_n, .comp_en, .qp, .gray_en,
    .in_valid(iv), .in_ready(ir), .in_rec(id), .in_last(il),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .out_last(ol));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [63:0] gen(bit smooth);
    logic [63:0] w;
    int base = $urandom % 256;
    for (int i = 0; i < 8; i++) begin
      int v = smooth ? base + int'($urandom % 9) - 4 : int'($urandom % 256);
      w[8*i +: 8] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
    end
    return w;
  endfunction

  logic [64:0] exp_q[$];
  int max_err[4];

  task automatic run(bit c, int q, bit g, int n, bit stall);
    int sent = 0, got = 0;
    logic [63:0] px;
    comp_en = c; qp = 2'(q); gray_en = g;
    while (got < n) begin
      @(negedge clk);
      px = gen(sent % 2 == 0);
      iv = (sent < n) && (!stall || ($urandom % 3 != 0));
      id = c ? encode(px, q, g) : 76'(px);
      il = (sent == n - 1);
      ordy = !stall || ($urandom % 3 != 0);
      #1;
      if (ov && ordy) begin
        check(exp_q.size() > 0 && {ol, od} == exp_q[0],
              $sformatf("c=%0d qp=%0d g=%0d grp %0d = %h exp %h", c, q, g, got, od, exp_q[0][63:0]));
        void'(exp_q.pop_front());
        got++;
      end
      if (iv && ir) begin
        logic [63:0] e;
        e = c ? decode(id, q, g) : px;
        // QP 0 is lossless: the reference must give the pixels back
        if (c && q == 0) check(e == px, "reference QP0 lossless");
        for (int i = 0; i < 8; i++) begin
          int d = int'(e[8*i +: 8]) - int'(px[8*i +: 8]);
          if (d < 0) d = -d;
          if (c && d > max_err[q]) max_err[q] = d;
        end
        exp_q.push_back({il, e});
        sent++;
      end
    end
  endtask

  initial begin
    iv = 0; ordy = 1; id = '0; il = 0; comp_en = 1; qp = 1; gray_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // hand-worked record, QP 1
    id = 76'hFF0B; iv = 1;
    @(negedge clk);
    iv = 0;
    check(ov && od == 64'h0C0A_0C0A_0C0A_0C0A, $sformatf("hand QP1 %h", od));
    gray_en = 1; id = 76'h800E; iv = 1;
    @(negedge clk);
    iv = 0;
    check(ov && od == 64'h0C0A_0C0A_0C0A_0C0A, $sformatf("hand QP1 gray %h", od));
    @(negedge clk);
    for (int q = 0; q < 4; q++)
      for (int g = 0; g < 2; g++) begin
        run(1'b1, q, g[0], 100, 1'b0);
        run(1'b1, q, g[0], 100, 1'b1);
      end
    run(1'b0, 0, 1'b0, 100, 1'b1);
    // coarser quantisation may only lose more
    check(max_err[0] == 0, "QP0 exact");
    check(max_err[1] <= max_err[3], "error grows with QP");
    $display("max abs error QP0..3: %0d %0d %0d %0d", max_err[0], max_err[1], max_err[2], max_err[3]);
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

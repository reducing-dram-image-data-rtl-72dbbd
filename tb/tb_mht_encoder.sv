// tb_mht_encoder: self-checking test of mht_encoder.
// Random and smooth pixel groups go through the block for every QP, with
// Gray coding on and off and with recompression off; results are compared
// with the integer reference model of mht_ref_pkg, under random stalls.
// Hand-worked values: the group 10,12,10,12,... gives Y0 = 11, Y1 = -2 and
// all other coefficients 0, so at QP 1 the record is 0xFF0B (0x800E Gray
// coded), and that record decodes to 11,12,11,12,...
module tb_mht_encoder;
  import mht_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        comp_en, gray_en;
  logic [1:0]  qp;
  logic        iv, ir, il, ov, ordy, ol;
  int checks = 0, failures = 0;
  logic [63:0] id;
  logic [75:0] orec;
  logic [6:0]  olen;

  mht_encoder dut (.clk, .rst_n, .comp_en, .qp, .gray_en,
    .in_valid(iv), .in_ready(ir), .in_data(id), .in_last(il),
    .out_valid(ov), .out_ready(ordy), .out_rec(orec), .out_len(olen), .out_last(ol));

  function automatic logic [75:0] expect_rec(logic [63:0] w, bit c, int q, bit g);
    return c ? encode(w, q, g) : 76'(w);
  endfunction
  function automatic int expect_len(bit c, int q);
    return c ? len_of(q) : 64;
  endfunction

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

  localparam int RLEN [4] = '{76, 64, 57, 50};
  logic [83:0] exp_q[$];   // {last, len, rec}

  task automatic run(bit c, int q, bit g, int n, bit stall);
    int sent = 0, got = 0;
    comp_en = c; qp = 2'(q); gray_en = g;
    while (got < n) begin
      @(negedge clk);
      iv = (sent < n) && (!stall || ($urandom % 3 != 0));
      id = gen(sent % 2 == 0);
      il = (sent == n - 1);
      ordy = !stall || ($urandom % 3 != 0);
      #1;
      if (ov && ordy) begin
        check(exp_q.size() > 0 && {ol, olen, orec} == exp_q[0],
              $sformatf("c=%0d qp=%0d g=%0d rec %0d = %h/%0d", c, q, g, got, orec, olen));
        void'(exp_q.pop_front());
        got++;
      end
      if (iv && ir) begin
        exp_q.push_back({il, 7'(expect_len(c, q)), expect_rec(id, c, q, g)});
        sent++;
      end
    end
  endtask

  initial begin
    iv = 0; ordy = 1; id = '0; il = 0; comp_en = 1; qp = 1; gray_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // hand-worked group, QP 1
    id = 64'h0C0A_0C0A_0C0A_0C0A; iv = 1;
    @(negedge clk);
    iv = 0;
    check(ov && orec == 76'hFF0B && olen == 64, $sformatf("hand QP1 %h", orec));
    gray_en = 1; iv = 1;
    @(negedge clk);
    iv = 0;
    check(ov && orec == 76'h800E, $sformatf("hand QP1 gray %h", orec));
    // flat group: DC only, record lengths 76/64/57/50
    for (int q = 0; q < 4; q++) begin
      qp = 2'(q); gray_en = 0; id = {8{8'd100}}; iv = 1;
      @(negedge clk);
      iv = 0;
      check(ov && orec == 76'd100 && olen == 7'(RLEN[q]),
            $sformatf("flat qp=%0d rec=%h len=%0d", q, orec, olen));
    end
    @(negedge clk);
    for (int q = 0; q < 4; q++)
      for (int g = 0; g < 2; g++) begin
        run(1'b1, q, g[0], 100, 1'b0);
        run(1'b1, q, g[0], 100, 1'b1);
      end
    run(1'b0, 0, 1'b0, 100, 1'b1);
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

// main_array_model: behavioural model of the main DRAM array as the hot data
// swap controller sees it (testbench use only; the DRAM array is not part of
// the design). Read requests are accepted with random back-pressure and
// answered in order after a random delay of 1 to 4 cycles. The content of
// word a is a fixed function of a, so readers can check what they got.
module main_array_model #(
  parameter int unsigned ADDR_W = 14,
  parameter bit          STALL  = 1'b1
) (
  input  logic              clk,
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rsp_valid,
  output logic [63:0]       rsp_data
);
  function automatic logic [63:0] content(logic [ADDR_W-1:0] a);
    return {32'(a) * 32'h9E37_79B9, 32'(a) ^ 32'hA5A5_0000};
  endfunction

  logic [63:0] q[$];
  int          due[$];
  int          now = 0;

  always @(posedge clk) begin
    now <= now + 1;
    if (rd_valid && rd_ready) begin
      q.push_back(content(rd_addr));
      due.push_back(now + 1 + (STALL ? int'($urandom % 4) : 0));
    end
    if (rsp_valid) begin
      void'(q.pop_front());
      void'(due.pop_front());
    end
  end

  always @(negedge clk) rd_ready <= !STALL || ($urandom % 4 != 0);
  // in-order responses: the head is released once its time has come
  always_comb begin
    rsp_valid = (q.size() > 0) && (due[0] <= now);
    rsp_data  = (q.size() > 0) ? q[0] : '0;
  end
endmodule

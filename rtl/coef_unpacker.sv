// coef_unpacker: splits bus words back into variable-length records.
//
// Inverse of coef_packer. Incoming words are appended to a bit accumulator;
// whenever at least in_len bits are present the low in_len bits form the next
// record. After NREC records (one block) the rest of the accumulator is the
// packer's zero padding and is dropped, so the next block starts on a word
// boundary. With small_blk set a block has NREC/4 records (an 8x8 chroma
// block instead of a 16x16 luminance block). in_len and small_blk must stay
// constant during a block.
//
// Timing: valid/ready on both sides. A word is accepted only when the
// accumulator, after this cycle's outgoing record, holds fewer than in_len
// bits, so 64-bit records flow at one per cycle. out_last marks the final
// record of a block.
module coef_unpacker
  import dm_pkg::*;
#(
  parameter int unsigned IW   = BUS_W,                       // bus word width
  parameter int unsigned RW   = REC_W,                       // widest record
  parameter int unsigned NREC = (BLK_W / PPB) * BLK_H        // records per block
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LEN_W-1:0]     in_len,      // record length of this block
  input  logic                 small_blk,   // 1: block of NREC/4 records (8x8 chroma)
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [IW-1:0]        in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [RW-1:0]        out_rec,
  output logic                 out_last
);
  localparam int unsigned AW = IW + RW;
  localparam int unsigned CW = $clog2(AW + 1);
  localparam int unsigned NB = $clog2(NREC);

  logic [AW-1:0] acc, acc_sh;
  logic [CW-1:0] cnt, cnt_sh;
  logic [NB-1:0] nrec;
  logic          out_fire, in_fire, blk_end;

  assign out_valid = (cnt >= CW'(in_len));
  assign out_rec   = RW'(acc) & ((RW'(1) << in_len) - RW'(1));
  assign out_last  = (nrec == (small_blk ? NB'(NREC / 4 - 1) : NB'(NREC - 1)));
  assign out_fire  = out_valid && out_ready;
  assign blk_end   = out_fire && out_last;

  assign acc_sh = blk_end ? '0 : (out_fire ? (acc >> in_len) : acc);
  assign cnt_sh = blk_end ? '0 : (out_fire ? (cnt - CW'(in_len)) : cnt);

  assign in_ready = (cnt_sh < CW'(in_len));
  assign in_fire  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cnt  <= '0;
      nrec <= '0;
    end else begin
      acc <= in_fire ? (acc_sh | (AW'(in_data) << cnt_sh)) : acc_sh;
      cnt <= in_fire ? (cnt_sh + CW'(IW)) : cnt_sh;
      if (out_fire) nrec <= blk_end ? '0 : nrec + 1'b1;
    end
  end

  initial assert ((NREC & (NREC - 1)) == 0 && NREC >= 4)
    else $error("NREC must be a power of two, at least 4");
endmodule

// coef_packer: packs variable-length records back to back into bus words.
//
// Compressed 8-pixel groups are 76, 64, 57 or 50 bits long (QP 0..3), so the
// amount of data written to DRAM shrinks as QP grows. This block appends each
// record to a bit accumulator at the current fill level and hands out a bus
// word as soon as BUS_W bits are present. The record flagged in_last ends a
// block: the remaining bits are then sent as a final word padded with zeros,
// so every block starts on a word boundary (this design's choice; the
// document does not describe how compressed data is laid out in DRAM). With
// 64-bit records (recompression off) every record becomes exactly one word.
//
// Timing: valid/ready on both sides. A record is accepted while fewer than
// BUS_W bits remain after the word being sent this cycle, so 64-bit records
// flow at one per cycle. Output is taken from a register (no combinational
// path from in_* to out_*); out_last marks the last word of a block.
module coef_packer
  import dm_pkg::*;
#(
  parameter int unsigned OW = BUS_W,   // bus word width
  parameter int unsigned RW = REC_W    // widest record
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [RW-1:0]        in_rec,
  input  logic [LEN_W-1:0]     in_len,
  input  logic                 in_last,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [OW-1:0]        out_data,
  output logic                 out_last
);
  localparam int unsigned AW = OW + RW;            // accumulator width
  localparam int unsigned CW = $clog2(AW + 1);

  logic [AW-1:0] acc, acc_sh, acc_nx;
  logic [CW-1:0] cnt, cnt_sh, cnt_nx;
  logic          flush, flush_nx;
  logic          out_fire, in_fire;
  logic [RW-1:0] rec_m;

  assign rec_m = in_rec & ((RW'(1) << in_len) - RW'(1));

  assign out_valid = (cnt >= CW'(OW)) || (flush && cnt != '0);
  assign out_data  = acc[OW-1:0];
  assign out_last  = flush && (cnt <= CW'(OW));
  assign out_fire  = out_valid && out_ready;

  // Fill level once this cycle's outgoing word is removed.
  assign acc_sh = out_fire ? (acc >> OW) : acc;
  assign cnt_sh = out_fire ? ((cnt >= CW'(OW)) ? cnt - CW'(OW) : '0) : cnt;

  assign in_ready = !flush && (cnt_sh < CW'(OW));
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    acc_nx   = acc_sh;
    cnt_nx   = cnt_sh;
    flush_nx = flush && (cnt_sh != '0);
    if (in_fire) begin
      acc_nx   = acc_sh | (AW'(rec_m) << cnt_sh);
      cnt_nx   = cnt_sh + CW'(in_len);
      flush_nx = in_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cnt   <= '0;
      flush <= 1'b0;
    end else begin
      acc   <= acc_nx;
      cnt   <= cnt_nx;
      flush <= flush_nx;
    end
  end

  initial assert (OW + RW < 2 ** CW) else $error("accumulator count too narrow");
endmodule

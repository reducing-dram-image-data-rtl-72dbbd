// pixel_scheduler: block buffer that applies (or undoes) pixel transfer
// scheduling for one image block.
//
// A BLK_W x BLK_H block of PIX_W-bit pixels is moved as BUS_W-bit words of
// PPB = BUS_W/PIX_W horizontally adjacent pixels, so each block row is split
// into S = BLK_W/PPB column strips. Conventional practice sends the words in
// raster order (row 0 strip 0, row 0 strip 1, row 1 strip 0, ...). The
// scheduled order sends the left-most strip from top to bottom, then the next
// strip, so that vertically adjacent pixels follow each other on the same
// wires. For the default 16x16 block on a 64-bit bus: P0-P7, P16-P23, ...,
// then P8-P15, P24-P31, ... (the document's Fig. 6 order).
//
// Word k of the scheduled order is raster word {k mod BLK_H, k div BLK_H}
// read as (row, strip), which for power-of-two sizes is only a swap of the
// two address fields.
//
// small_blk selects a half-size block (BLK_W/2 x BLK_H/2), the 8x8 chroma
// block that goes with a 16x16 luminance block in 4:2:0 video. The document
// stores chrominance in blocks too; the 4:2:0 block size is this design's
// assumption. Such a block is one strip wide on a 64-bit bus, so its
// scheduled order equals its raster order (8 words, each row under the one
// above) and only the word count changes. small_blk must stay constant
// during a block.
//
// TO_BUS = 1 (write path): words arrive in raster order and leave scheduled.
// TO_BUS = 0 (read path):  words arrive scheduled and leave in raster order.
//
// Timing: single block buffer (this design's choice). The buffer fills with
// one word per accepted in_valid/in_ready handshake (in_ready is high while
// filling), then drains one word per out_valid/out_ready handshake; out_last
// marks the final word of the block. A block therefore takes 2*S*BLK_H
// cycles when neither side stalls (16 for a small block at the defaults).
// The output word is read combinationally
// from the buffer.
module pixel_scheduler
  import dm_pkg::*;
#(
  parameter bit          TO_BUS = 1'b1,
  parameter int unsigned BW     = BUS_W,
  parameter int unsigned PW     = PIX_W,
  parameter int unsigned BLKW   = BLK_W,
  parameter int unsigned BLKH   = BLK_H
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          small_blk,   // 1: BLKW/2 x BLKH/2 block (8x8 chroma)
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [BW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [BW-1:0] out_data,
  output logic          out_last
);
  localparam int unsigned S   = BLKW / (BW / PW);   // column strips per row
  localparam int unsigned NW  = S * BLKH;           // words per block
  localparam int unsigned AW  = $clog2(NW);
  localparam int unsigned S2  = (BLKW / 2) / (BW / PW);   // strips, small block
  localparam int unsigned H2  = BLKH / 2;
  localparam int unsigned NW2 = S2 * H2;                 // words, small block

  typedef enum logic {FILL, DRAIN} state_t;
  state_t state;

  logic [BW-1:0] mem [NW];
  logic [AW-1:0] wcnt, rcnt;

  // Scheduled position k -> raster word address (row * strips + strip),
  // for the full block or the small block.
  function automatic logic [AW-1:0] sched2raster(logic [AW-1:0] k, logic is_small);
    logic [AW-1:0] row, strip;
    if (is_small) begin
      row   = AW'(k % AW'(H2));
      strip = AW'(k / AW'(H2));
      return AW'(row * AW'(S2) + strip);
    end
    row   = AW'(k % AW'(BLKH));
    strip = AW'(k / AW'(BLKH));
    return AW'(row * AW'(S) + strip);
  endfunction

  logic [AW-1:0] last_w;
  assign last_w = small_blk ? AW'(NW2 - 1) : AW'(NW - 1);

  logic [AW-1:0] waddr, raddr;
  assign waddr = TO_BUS ? wcnt : sched2raster(wcnt, small_blk);
  assign raddr = TO_BUS ? sched2raster(rcnt, small_blk) : rcnt;

  assign in_ready  = (state == FILL);
  assign out_valid = (state == DRAIN);
  assign out_data  = mem[raddr];
  assign out_last  = (state == DRAIN) && (rcnt == last_w);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[waddr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FILL;
      wcnt  <= '0;
      rcnt  <= '0;
    end else begin
      unique case (state)
        FILL: if (in_valid) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == last_w) begin
            wcnt  <= '0;
            state <= DRAIN;
          end
        end
        DRAIN: if (out_ready) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == last_w) begin
            rcnt  <= '0;
            state <= FILL;
          end
        end
      endcase
    end
  end

  initial begin
    assert (BW % PW == 0 && BLKW % (BW / PW) == 0)
      else $error("block width must be a whole number of bus words");
    assert ((BLKW / 2) % (BW / PW) == 0 && BLKH % 2 == 0)
      else $error("half-size block width must be a whole number of bus words");
    assert ((NW & (NW - 1)) == 0) else $error("words per block must be a power of two");
  end
endmodule

// hot_swap_ctrl: run-time hot data swap into the hot data zone.
//
// When the reference frames do not fit in the hot data zone, decoding runs
// region by region: the same region of every reference frame is brought into
// the hot zone, and motion compensation of that region is then done for all
// predicted frames before the next region is fetched. This controller does
// the fetch. On start it copies, for f = 0 .. n_refs-1, the words
//   main[frame_base + f*frame_words + region_idx*region_words + w],
//   w = 0 .. region_words-1,
// into hot zone slot f, i.e. hot[f*region_words + w]. Addresses count BUS_W
// bit words. Only copying in is done: reference data is read-only, so the
// old hot zone content is simply overwritten (this design's choice).
//
// Memory side: read requests to the main array with a valid/ready handshake
// (main_rd_*), read data returned in order with main_rsp_valid, any latency;
// writes to the hot zone one word per cycle (hot_wr_*), always accepted.
// Timing: one request per cycle while main_rd_ready is high; done pulses for
// one cycle after the last word is written. err is set when the requested
// regions do not fit in the HOT_WORDS words of the hot zone (2^HOT_AW by
// default; fewer for a zone whose size is not a power of two) and nothing is
// copied. swap_words
// counts all words moved since reset, the quantity that sets the swap energy.
// hot_wr_data is main_rsp_data on a wire: the data is moved, not changed.
module hot_swap_ctrl #(
  parameter int unsigned ADDR_W  = 25,      // 2 Gb of 64-bit words
  parameter int unsigned HOT_AW  = 19,      // 32 Mb hot data zone
  parameter int unsigned DATA_W  = 64,
  parameter int unsigned REF_W   = 3,       // up to 7 reference frames
  parameter int unsigned CNT_W   = 32,
  parameter int unsigned HOT_WORDS = 2 ** HOT_AW   // usable hot zone words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [REF_W-1:0]  n_refs,
  input  logic [ADDR_W-1:0] frame_base,
  input  logic [ADDR_W-1:0] frame_words,
  input  logic [ADDR_W-1:0] region_idx,
  input  logic [HOT_AW:0]   region_words,
  output logic              busy,
  output logic              done,
  output logic              err,
  output logic              main_rd_valid,
  input  logic              main_rd_ready,
  output logic [ADDR_W-1:0] main_rd_addr,
  input  logic              main_rsp_valid,
  input  logic [DATA_W-1:0] main_rsp_data,
  output logic              hot_wr_en,
  output logic [HOT_AW-1:0] hot_wr_addr,
  output logic [DATA_W-1:0] hot_wr_data,
  output logic [CNT_W-1:0]  swap_words
);
  localparam int unsigned TW = HOT_AW + REF_W + 1;

  logic [ADDR_W-1:0] base_f;      // start of region in the current frame
  logic [HOT_AW:0]   w_req;       // word within the region being requested
  logic [REF_W-1:0]  f_req;       // frame being requested
  logic              req_on;      // still requests to issue
  logic [TW-1:0]     total, n_wr;
  logic [TW-1:0]     need;

  assign need = TW'(n_refs) * TW'(region_words);

  assign main_rd_valid = busy && req_on;
  assign main_rd_addr  = base_f + ADDR_W'(w_req);
  assign hot_wr_en     = busy && main_rsp_valid;
  assign hot_wr_addr   = HOT_AW'(n_wr);
  assign hot_wr_data   = main_rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      err        <= 1'b0;
      base_f     <= '0;
      w_req      <= '0;
      f_req      <= '0;
      req_on     <= 1'b0;
      total      <= '0;
      n_wr       <= '0;
      swap_words <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (need == '0 || need > TW'(HOT_WORDS)) begin
            err <= 1'b1;
            done <= 1'b1;
          end else begin
            err    <= 1'b0;
            busy   <= 1'b1;
            req_on <= 1'b1;
            total  <= need;
            n_wr   <= '0;
            w_req  <= '0;
            f_req  <= '0;
            base_f <= frame_base + ADDR_W'(region_idx * ADDR_W'(region_words));
          end
        end
      end else begin
        if (main_rd_valid && main_rd_ready) begin
          if (w_req == region_words - 1'b1) begin
            w_req  <= '0;
            f_req  <= f_req + 1'b1;
            base_f <= base_f + frame_words;
            if (f_req == n_refs - 1'b1) req_on <= 1'b0;
          end else begin
            w_req <= w_req + 1'b1;
          end
        end
        if (main_rsp_valid) begin
          n_wr       <= n_wr + 1'b1;
          swap_words <= swap_words + 1'b1;
          if (n_wr == total - 1'b1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule

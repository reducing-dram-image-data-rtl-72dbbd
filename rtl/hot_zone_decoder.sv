// hot_zone_decoder: steers a DRAM request to the hot data zone or to the
// main memory array by address masking.
//
// In the heterogeneous DRAM the hot data zone (a small, low-energy array next
// to the I/O) owns a fixed, aligned window of the address space, so the
// controller only has to compare the upper address bits with the window's
// base. Addresses count BUS_W-bit words. Defaults: a 2 Gb device
// (2^31 / 64 = 2^25 words) with a 32 Mb hot data zone (2^19 words), the
// document's main configuration. The window is aligned to 2^HOT_AW words and
// holds HOT_WORDS <= 2^HOT_AW of them, so a zone whose size is not a power of
// two (24 Mb = 393,216 words, one of the sizes the method evaluates) is a
// masked compare of the upper bits plus a limit compare of the offset.
// Placing the window at the top of the address space (HOT_BASE) and the
// aligned window are this design's choices.
//
// Outputs: hot_sel / main_sel qualify req_valid; hot_addr is the offset inside
// the hot zone, main_addr the unchanged address for the main array. Purely
// combinational. hot_addr and main_addr are wires taken from req_addr (the
// offset is the low address bits because the window is aligned); only
// hot_sel and main_sel carry logic.
module hot_zone_decoder #(
  parameter int unsigned   ADDR_W   = 25,
  parameter int unsigned   HOT_AW   = 19,
  parameter logic [24:0]   HOT_BASE = 25'h1F8_0000,
  parameter int unsigned   HOT_WORDS = 2 ** HOT_AW
) (
  input  logic              req_valid,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              hot_sel,
  output logic              main_sel,
  output logic [HOT_AW-1:0] hot_addr,
  output logic [ADDR_W-1:0] main_addr
);
  localparam logic [ADDR_W-1:0] MASK = ~((ADDR_W'(1) << HOT_AW) - ADDR_W'(1));

  logic in_window;
  assign in_window = ((req_addr & MASK) == (ADDR_W'(HOT_BASE) & MASK)) &&
                     ((HOT_AW + 1)'(req_addr[HOT_AW-1:0]) < (HOT_AW + 1)'(HOT_WORDS));
  assign hot_sel   = req_valid && in_window;
  assign main_sel  = req_valid && !in_window;
  assign hot_addr  = req_addr[HOT_AW-1:0];
  assign main_addr = req_addr;

  initial assert ((ADDR_W'(HOT_BASE) & ~MASK) == '0)
    else $error("HOT_BASE must be aligned to the hot zone size");
  initial assert (HOT_WORDS >= 1 && HOT_WORDS <= 2 ** HOT_AW)
    else $error("HOT_WORDS must fit in the 2^HOT_AW window");
endmodule

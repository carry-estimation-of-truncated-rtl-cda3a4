// pingpong_cache: the small cache of the ping-pong cache-memory scheme.
//
// The four FFT stages are taken in two pairs, stages 0/1 and stages 2/3.
// In the first stage of a pair the engine reads the main memory and writes
// its results here; in the second stage it reads them back from here and
// writes the main memory. Each word therefore crosses the main memory once
// per pair instead of once per stage, which halves the main-memory traffic.
// That only works if the groups of the first stage that feed a set of
// second-stage groups are run together, so the controller orders them that
// way:
//   pair 0: for each offset o = 0..31, the eight stage-0 groups o + 32*i
//           (64 words), then the eight stage-1 groups that use exactly those
//           words;
//   pair 1: for each 32-word block, its four stage-2 groups, then its four
//           stage-3 groups.
// The cache is addressed with the main-memory address of a word and keeps
// only the bits that vary inside the current window: address bits [10:8]
// and [7:5] for pair 0, bits [4:0] for pair 1. So it holds 64 words, and
// the controller uses the same address arithmetic for both memories.
//
// The pairing and the order of the groups follow from the data flow
// described for the ping-pong cache (results written to the cache, read
// back by the next stage, then stored to main memory); the 64-word size and
// the address mapping are this design's own choices for a 2048 = 8*8*8*4
// transform.
//
// Interface: one synchronous read port (rdata valid the cycle after re)
// and one synchronous write port, both taking 11-bit main-memory addresses;
// pair selects the mapping. rdata holds its value while re is low. The
// contents are not reset.
module pingpong_cache
  import trunc_pkg::*;
(
  input  logic              clk,
  input  logic              pair,
  input  logic              re,
  input  logic [FFT_AW-1:0] raddr,
  output mem_word_t         rdata,
  input  logic              we,
  input  logic [FFT_AW-1:0] waddr,
  input  mem_word_t         wdata
);

  localparam int unsigned DEPTH = 64;

  function automatic logic [5:0] local_addr(input logic p, input logic [FFT_AW-1:0] a);
    return p ? {1'b0, a[4:0]} : {a[10:8], a[7:5]};
  endfunction

  mem_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[local_addr(pair, waddr)] <= wdata;
    if (re) rdata <= mem[local_addr(pair, raddr)];
  end

endmodule

// fft_main_mem: main data memory of the FFT processor.
//
// DEPTH words of mem_word_t (12-bit real, 12-bit imaginary, 5-bit block
// exponent). One synchronous read port (data one cycle after raddr, when re
// is high; rdata holds otherwise) and one synchronous write port; a read of
// the address being written in the same cycle returns the old word. The
// contents are not reset. The depth is the transform size; the word layout
// (one exponent per word) is this design's choice.
module fft_main_mem
  import trunc_pkg::*;
#(
  parameter int unsigned DEPTH = FFT_N,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            re,
  input  logic [AW-1:0]   raddr,
  output mem_word_t       rdata,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  mem_word_t       wdata
);

  mem_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

// fft2048_top: 2048-point FFT/IFFT processor whose twiddle multipliers are
// truncated-width Booth multipliers with statistical carry estimation, and,
// beside it, a stand-alone fixed-width Baugh-Wooley multiplier with Type III
// carry estimation.
//
// FFT: an in-place, memory-based processor. fft_ctrl loads 2048 complex
// 12-bit samples into fft_main_mem, runs three radix-2^3 stages and one
// radix-2^2 stage through the processing engine (pe: block-floating-point
// alignment, butterfly, overflow scaling, 12x9 truncated complex
// multiplication), and streams the result out in natural order as a 12-bit
// complex mantissa and a 5-bit exponent per bin (bin = out * 2^out_exp).
// The stages run in pairs through the 64-word pingpong_cache: main memory
// -> engine -> cache, then cache -> engine -> main memory.
// The inverse transform conjugates the input and the output.
//
// Handshake: pulse start (with inverse) while idle; then feed samples with
// in_valid while in_ready is high; results come one per cycle with
// out_valid, done pulses after the last. On its own a transform takes
// 2048 + 4 * 256 * 20 + 2048 + 2 = 24578 cycles from start to done.
// Continuous flow: pulse start again (with the next frame's inverse) while
// busy, and the next frame's samples are taken while the current result
// comes out, out_valid one cycle after each accepted sample; a frame then
// goes through every 2048 + 20480 cycles. busy stays high until the last
// queued frame is out.
// The ping-pong cache, the stage pairing and the continuous-flow address
// map follow the processor's described organisation; the 64-word cache
// size, the group order and the cycle timing are this design's own.
//
// The Baugh-Wooley multiplier is combinational: bw_p = (bw_a * bw_b) / 2^8
// with the lower 8 columns replaced by the Type III estimate.
module fft2048_top
  import trunc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               inverse,
  output logic               busy,
  output logic               done,
  output logic               in_ready,
  input  logic               in_valid,
  input  sample_t            in_re,
  input  sample_t            in_im,
  output logic               out_valid,
  output sample_t            out_re,
  output sample_t            out_im,
  output bexp_t              out_exp,
  input  logic signed [7:0]  bw_a,
  input  logic signed [7:0]  bw_b,
  output logic signed [7:0]  bw_p
);

  logic [FFT_AW-1:0] mem_raddr, mem_waddr;
  mem_word_t         mem_rdata, mem_wdata;
  logic              mem_we, mem_re;
  logic [FFT_AW-1:0] cache_raddr, cache_waddr;
  mem_word_t         cache_rdata, cache_wdata;
  logic              cache_we, cache_re, cache_pair;

  logic              pe_in_valid, pe_out_valid, pe_radix4;
  sample_t           pe_x_re [8], pe_x_im [8], pe_y_re [8], pe_y_im [8];
  bexp_t             pe_x_exp [8];
  bexp_t             pe_y_exp;
  logic [FFT_AW-1:0] pe_tw_step;

  fft_ctrl u_ctrl (
    .clk, .rst_n, .start, .inverse, .busy, .done,
    .in_ready, .in_valid, .in_re, .in_im,
    .out_valid, .out_re, .out_im, .out_exp,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata,
    .cache_pair, .cache_re, .cache_raddr, .cache_rdata, .cache_we, .cache_waddr, .cache_wdata,
    .pe_in_valid, .pe_x_re, .pe_x_im, .pe_x_exp, .pe_radix4, .pe_tw_step,
    .pe_out_valid, .pe_y_re, .pe_y_im, .pe_y_exp);

  fft_main_mem u_mem (
    .clk, .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata));

  pingpong_cache u_cache (
    .clk, .pair(cache_pair), .re(cache_re), .raddr(cache_raddr), .rdata(cache_rdata),
    .we(cache_we), .waddr(cache_waddr), .wdata(cache_wdata));

  pe u_pe (
    .clk, .rst_n, .in_valid(pe_in_valid),
    .x_re(pe_x_re), .x_im(pe_x_im), .x_exp(pe_x_exp),
    .radix4(pe_radix4), .tw_step(pe_tw_step),
    .out_valid(pe_out_valid), .y_re(pe_y_re), .y_im(pe_y_im), .y_exp(pe_y_exp));

  bw_trunc_mult #(.N(8), .METHOD(COMP_TYPE3)) u_bw (.a(bw_a), .b(bw_b), .p(bw_p));

endmodule

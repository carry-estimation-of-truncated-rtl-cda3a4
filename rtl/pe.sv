// pe: processing engine of the 2048-point FFT.
//
// One group of eight complex words (with their block exponents) enters per
// in_valid. The datapath is
//   align (block_scaling_unit) -> radix-2^3 butterfly (bu_r8) -> ODSU1
//   | register |
//   twiddle multiply (cmult_trunc, truncated Booth multipliers with Type III
//   carry estimation) -> ODSU2 -> exponent update | register |
// Butterfly output p (DFT bin rev3(p)) is multiplied by W_2048^(rev3(p) *
// tw_step); the caller supplies tw_step = b * 8^stage for group offset b.
// Output 0 and any output whose twiddle index is 0 skip the multiplier
// (W^0 = 1). In radix-2^2 mode (radix4 = 1, last stage) the butterfly forms
// two 4-point DFTs, the twiddle multipliers are skipped and ODSU2 does not
// scale; only ODSU1 scales.
//
// Timing: two register stages; results for a group appear with out_valid
// two clock cycles after its in_valid, and a new group may enter every
// cycle. rst_n is an active-low synchronous reset of the valid flags.
module pe
  import trunc_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned EW = EXP_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_re   [8],
  input  logic signed [DW-1:0] x_im   [8],
  input  logic        [EW-1:0] x_exp  [8],
  input  logic                 radix4,
  input  logic [FFT_AW-1:0]    tw_step,
  output logic                 out_valid,
  output logic signed [DW-1:0] y_re   [8],
  output logic signed [DW-1:0] y_im   [8],
  output logic        [EW-1:0] y_exp
);

  localparam int unsigned BUW = DW + 4;                    // butterfly output
  localparam int unsigned CMW = DW + TW_W - 6 + 1 - 2;     // cmult output (14)
  localparam int unsigned S1W = $clog2(BUW - DW + 1);
  localparam int unsigned S2W = $clog2(CMW - DW + 1);

  // ---------------- stage 0: align, butterfly, ODSU1 ----------------
  logic signed [DW-1:0]  al_re [8], al_im [8];
  logic        [EW-1:0]  blk_exp;
  logic signed [BUW-1:0] bu_re [8], bu_im [8];
  logic signed [DW-1:0]  o1_re [8], o1_im [8];
  logic        [S1W-1:0] shift1;

  logic signed [DW-1:0]  r1_re [8], r1_im [8];
  logic        [EW-1:0]  r1_exp;
  logic        [S1W-1:0] r1_s1;
  logic                  r1_radix4, r1_valid;
  logic [FFT_AW-1:0]     r1_k  [8];

  logic        [S2W-1:0] shift2;
  logic        [EW-1:0]  new_exp;

  block_scaling_unit #(.DW(DW), .EW(EW), .S1W(S1W), .S2W(S2W)) u_bsu (
    .x_re(x_re), .x_im(x_im), .x_exp(x_exp),
    .y_re(al_re), .y_im(al_im), .blk_exp(blk_exp),
    .base_exp(r1_exp), .shift1(r1_s1), .shift2(shift2), .out_exp(new_exp));

  bu_r8 #(.IW(DW), .OW(BUW)) u_bu (
    .x_re(al_re), .x_im(al_im), .radix4(radix4), .y_re(bu_re), .y_im(bu_im));

  odsu #(.IW(BUW), .OW(DW)) u_odsu1 (
    .en(1'b1), .x_re(bu_re), .x_im(bu_im), .y_re(o1_re), .y_im(o1_im), .shift(shift1));

  always_ff @(posedge clk) begin
    if (!rst_n) r1_valid <= 1'b0;
    else        r1_valid <= in_valid;
    if (in_valid) begin
      r1_re     <= o1_re;
      r1_im     <= o1_im;
      r1_exp    <= blk_exp;
      r1_s1     <= shift1;
      r1_radix4 <= radix4;
      for (int p = 0; p < 8; p++)
        r1_k[p] <= FFT_AW'(32'(rev3(3'(p))) * 32'(tw_step));
    end
  end

  // ---------------- stage 1: twiddle multiply, ODSU2 ----------------
  logic signed [TW_W-1:0] w_re [8], w_im [8];
  logic signed [CMW-1:0]  cm_re [8], cm_im [8];
  logic signed [CMW-1:0]  m_re [8], m_im [8];
  logic signed [DW-1:0]   o2_re [8], o2_im [8];

  twiddle_rom #(.N(FFT_N), .TW(TW_W), .NP(8)) u_tw (.k(r1_k), .wr(w_re), .wi(w_im));

  for (genvar p = 0; p < 8; p++) begin : g_cm
    if (p == 0) begin : g_unit
      assign cm_re[p] = CMW'(r1_re[p]);
      assign cm_im[p] = CMW'(r1_im[p]);
    end else begin : g_mul
      cmult_trunc #(.DW(DW), .TW(TW_W), .TRUNC(6), .POST_DROP(2)) u_cm (
        .xr(r1_re[p]), .xi(r1_im[p]), .wr(w_re[p]), .wi(w_im[p]),
        .yr(cm_re[p]), .yi(cm_im[p]));
    end
    assign m_re[p] = (r1_radix4 || r1_k[p] == '0) ? CMW'(r1_re[p]) : cm_re[p];
    assign m_im[p] = (r1_radix4 || r1_k[p] == '0) ? CMW'(r1_im[p]) : cm_im[p];
  end

  odsu #(.IW(CMW), .OW(DW)) u_odsu2 (
    .en(!r1_radix4), .x_re(m_re), .x_im(m_im), .y_re(o2_re), .y_im(o2_im), .shift(shift2));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= r1_valid;
    if (r1_valid) begin
      y_re  <= o2_re;
      y_im  <= o2_im;
      y_exp <= new_exp;
    end
  end

endmodule

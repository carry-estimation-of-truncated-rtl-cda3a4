// block_scaling_unit: block-floating-point bookkeeping of the processing
// engine.
//
// Every stored word carries an exponent: its true value is word * 2^exp.
// Before a butterfly, the eight inputs are aligned to the largest of their
// exponents (each is shifted right arithmetically by the difference), so
// the butterfly adds numbers of the same scale; blk_exp is that common
// exponent. After the butterfly and the twiddle multiplication the two
// overflow units report how far they scaled; out_exp = base_exp + shift1 +
// shift2, saturated to the exponent range, is the exponent written back
// with the eight results. base_exp is the blk_exp of the same group, given
// back by the caller once the shifts are known (the processing engine
// delays it through its pipeline). In the first stage all exponents are 0
// and the alignment does nothing. Purely combinational.
module block_scaling_unit #(
  parameter int unsigned DW  = 12,
  parameter int unsigned EW  = 5,
  parameter int unsigned S1W = 3,
  parameter int unsigned S2W = 2
) (
  input  logic signed [DW-1:0]  x_re  [8],
  input  logic signed [DW-1:0]  x_im  [8],
  input  logic        [EW-1:0]  x_exp [8],
  output logic signed [DW-1:0]  y_re  [8],
  output logic signed [DW-1:0]  y_im  [8],
  output logic        [EW-1:0]  blk_exp,
  input  logic        [EW-1:0]  base_exp,
  input  logic        [S1W-1:0] shift1,
  input  logic        [S2W-1:0] shift2,
  output logic        [EW-1:0]  out_exp
);

  always_comb begin
    blk_exp = '0;
    for (int p = 0; p < 8; p++) if (x_exp[p] > blk_exp) blk_exp = x_exp[p];
    for (int p = 0; p < 8; p++) begin
      logic [EW-1:0] d;
      d = blk_exp - x_exp[p];
      y_re[p] = x_re[p] >>> d;
      y_im[p] = x_im[p] >>> d;
    end
  end

  always_comb begin
    logic [EW:0] sum;
    sum = (EW+1)'(base_exp) + (EW+1)'(shift1) + (EW+1)'(shift2);
    out_exp = sum[EW] ? '1 : sum[EW-1:0];
  end

endmodule

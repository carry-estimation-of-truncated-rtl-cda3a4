// cmult_trunc: complex multiplier of the FFT built from four truncated
// Booth multipliers.
//
// (xr + j xi)(wr + j wi) = (xr wr - xi wi) + j (xr wi + xi wr)
// Each real product is a DW x TW booth_trunc_mult that drops its TRUNC
// lowest columns and adds the Type III carry estimate (for 12 x 9 with 6
// dropped columns: floor(beta/2) + 1), giving a DW+TW-TRUNC = 15-bit result.
// The two products of each part are added or subtracted at full width
// (16 bits) and POST_DROP = 2 more LSBs are removed by truncation, so the
// output has 14 bits. The twiddle has TW-1 = 8 fraction bits, which makes
// TRUNC + POST_DROP = 8 dropped bits return the output to the scale of the
// input sample.
//
// Interface: purely combinational.
module cmult_trunc
  import trunc_pkg::*;
#(
  parameter int unsigned DW        = 12,
  parameter int unsigned TW        = 9,
  parameter int unsigned TRUNC     = 6,
  parameter int unsigned POST_DROP = 2,
  localparam int unsigned PWID     = DW + TW - TRUNC,
  localparam int unsigned YW       = PWID + 1 - POST_DROP
) (
  input  logic signed [DW-1:0] xr,
  input  logic signed [DW-1:0] xi,
  input  logic signed [TW-1:0] wr,
  input  logic signed [TW-1:0] wi,
  output logic signed [YW-1:0] yr,
  output logic signed [YW-1:0] yi
);

  logic signed [PWID-1:0] p_rr, p_ii, p_ri, p_ir;

  booth_trunc_mult #(.AW(DW), .BW(TW), .TRUNC(TRUNC), .METHOD(COMP_TYPE3)) u_rr (.a(xr), .b(wr), .p(p_rr));
  booth_trunc_mult #(.AW(DW), .BW(TW), .TRUNC(TRUNC), .METHOD(COMP_TYPE3)) u_ii (.a(xi), .b(wi), .p(p_ii));
  booth_trunc_mult #(.AW(DW), .BW(TW), .TRUNC(TRUNC), .METHOD(COMP_TYPE3)) u_ri (.a(xr), .b(wi), .p(p_ri));
  booth_trunc_mult #(.AW(DW), .BW(TW), .TRUNC(TRUNC), .METHOD(COMP_TYPE3)) u_ir (.a(xi), .b(wr), .p(p_ir));

  logic signed [PWID:0] s_re, s_im;
  assign s_re = (PWID+1)'(p_rr) - (PWID+1)'(p_ii);
  assign s_im = (PWID+1)'(p_ri) + (PWID+1)'(p_ir);

  assign yr = YW'(s_re >>> POST_DROP);
  assign yi = YW'(s_im >>> POST_DROP);

endmodule

// tb_cmult_trunc: self-checking test of the truncated complex multiplier.
//
// Random and corner operands. The reference forms each 12x9 product with
// the dropped 6 columns removed (row by row, Booth digits as integers) plus
// the carry floor(beta/2) + 1, then adds/subtracts and drops 2 bits. A
// second check bounds the distance to the exact complex product.
`timescale 1ns/1ps
module tb_cmult_trunc;
  int checks = 0, failures = 0;

  logic signed [11:0] xr, xi;
  logic signed [8:0]  wr, wi;
  logic signed [13:0] yr, yi;

  cmult_trunc dut (.*);

  function automatic longint tprod(input longint a, input longint b);
    longint kept = 0, beta = 0;
    for (int i = 0; i < 5; i++) begin
      int hi, mid, lo, y, neg;
      longint r;
      hi  = int'((b >>> ((2*i+1) < 9 ? 2*i+1 : 8)) & 1);
      mid = int'((b >>> (2*i)) & 1);
      lo  = (i == 0) ? 0 : int'((b >>> (2*i-1)) & 1);
      y   = -2*hi + mid + lo;
      neg = (hi == 1 && !(mid == 1 && lo == 1)) ? 1 : 0;
      r   = (y < 0 ? -y : y) * a;
      if (neg == 1) r = -r - 1;
      kept += (r * (longint'(1) << (2*i))) >>> 6;
      if (2*i >= 6) kept += longint'(neg) << (2*i - 6);
      if (5 - 2*i >= 0) beta += ((r & 13'h1fff) >> (5 - 2*i)) & 1;
    end
    return kept + beta / 2 + 1;
  endfunction

  task automatic one(input int a, input int b, input int c, input int d);
    longint er, ei;
    real    xr_e, xi_e;
    xr = 12'(a); xi = 12'(b); wr = 9'(c); wi = 9'(d);
    #1;
    er = (tprod(xr, wr) - tprod(xi, wi)) >>> 2;
    ei = (tprod(xr, wi) + tprod(xi, wr)) >>> 2;
    checks += 2;
    if (longint'(yr) != er || longint'(yi) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL x=(%0d,%0d) w=(%0d,%0d) y=(%0d,%0d) ref=(%0d,%0d)", xr, xi, wr, wi, yr, yi, er, ei);
    end
    xr_e = (real'(xr) * wr - real'(xi) * wi) / 256.0;
    xi_e = (real'(xr) * wi + real'(xi) * wr) / 256.0;
    if (real'(yr) - xr_e > 2.0 || real'(yr) - xr_e < -2.0 || real'(yi) - xi_e > 2.0 || real'(yi) - xi_e < -2.0) begin
      failures++;
      $display("FAIL bound x=(%0d,%0d) w=(%0d,%0d) y=(%0d,%0d) exact=(%f,%f)", xr, xi, wr, wi, yr, yi, xr_e, xi_e);
    end
  endtask

  initial begin
    one(-2048, -2048, -256, -256);
    one(2047, 2047, 255, 255);
    one(-2048, 2047, 255, -256);
    one(0, 0, 0, 0);
    for (int k = 0; k < 50000; k++)
      one(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048,
          int'($urandom_range(511)) - 256, int'($urandom_range(511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

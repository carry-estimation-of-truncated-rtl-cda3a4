// tb_fft64_trunc_sweep: SQNR of a 64-point radix-2^3 FFT against the number
// of truncated product bits, for three ways of forming the twiddle
// products.
//
// The 64-point transform is two radix-2^3 butterfly stages with one
// twiddle multiplication between them: x[8i + a] (i = 0..7) go through
// butterfly a, its output p holds sub-bin b = rev3(p) and is multiplied by
// W64^(a*b); the second stage is an 8-point DFT over a. Samples are 8-bit
// complex, uniform over the full range. The first stage is bu_r8 with a
// 12-bit output, saturated to 11 bits (the multiplier input width); the
// twiddles are 9-bit values from twiddle_rom. Each complex product uses
// four 11x9 products that drop their k least significant bits, k = 8..12:
//   direct truncation - booth_trunc_mult with no carry estimate;
//   Type III          - booth_trunc_mult with the Type III estimate;
//   post truncation   - exact product, then floor(p / 2^k) (computed here);
//   post truncation with +1 added to the imaginary part, which holds the
//   sum of two truncation errors (computed here).
// The second stage is done in double precision, so the SQNR measures the
// multiplication error (plus the small first-stage error common to all).
// SQNR = 10 log10(sum |Xref|^2 / sum |Xref - X|^2) against a double
// precision DFT, over 200 random frames. Checks: for every k, Type III
// beats direct truncation by at least 5 dB and is within 2.5 dB of post
// truncation, and the +1 imaginary correction improves post truncation
// by at least 1 dB; every method loses SQNR as k grows; fewer than 0.1 % of the
// first-stage outputs saturate. The published software simulation of this
// experiment shows the same ranking.
`timescale 1ns/1ps
module tb_fft64_trunc_sweep;
  import trunc_pkg::*;
  int checks = 0, failures = 0;
  localparam int NK = 5;           // k = 8 .. 12
  localparam int FRAMES = 200;
  localparam real PI = 3.14159265358979323846;

  // first stage
  logic signed [7:0]  bx_re [8], bx_im [8];
  logic signed [11:0] by_re [8], by_im [8];
  bu_r8 #(.IW(8), .OW(12)) u_bu (.x_re(bx_re), .x_im(bx_im), .radix4(1'b0), .y_re(by_re), .y_im(by_im));

  // twiddles
  logic        [5:0] tk [1];
  logic signed [8:0] twr [1], twi [1];
  twiddle_rom #(.N(64), .TW(9), .NP(1)) u_tw (.k(tk), .wr(twr), .wi(twi));

  // truncated multipliers: [k][method 0 direct, 1 Type III]
  logic signed [10:0] ar, ai;
  real prod_re [NK][2], prod_im [NK][2];
  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int unsigned K = 8 + g;
    for (genvar m = 0; m < 2; m++) begin : g_m
      localparam comp_method_e METH = m ? COMP_TYPE3 : COMP_NONE;
      logic signed [20-K-1:0] p_rr, p_ii, p_ri, p_ir;
      booth_trunc_mult #(.AW(11), .BW(9), .TRUNC(K), .METHOD(METH)) u_rr (.a(ar), .b(twr[0]), .p(p_rr));
      booth_trunc_mult #(.AW(11), .BW(9), .TRUNC(K), .METHOD(METH)) u_ii (.a(ai), .b(twi[0]), .p(p_ii));
      booth_trunc_mult #(.AW(11), .BW(9), .TRUNC(K), .METHOD(METH)) u_ri (.a(ar), .b(twi[0]), .p(p_ri));
      booth_trunc_mult #(.AW(11), .BW(9), .TRUNC(K), .METHOD(METH)) u_ir (.a(ai), .b(twr[0]), .p(p_ir));
      // value in input units: products carry 8 twiddle fraction bits
      always_comb begin
        prod_re[g][m] = real'(int'(p_rr) - int'(p_ii)) * real'(1 << K) / 256.0;
        prod_im[g][m] = real'(int'(p_ri) + int'(p_ir)) * real'(1 << K) / 256.0;
      end
    end
  end

  function automatic int rev3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  function automatic longint fdiv(input longint v, input int k);
    return v >>> k;
  endfunction

  real sig = 0;
  real err [NK][4];
  int  n_sat = 0;

  initial begin
    real xr [64], xi [64];
    real yr [NK][4][8][8], yi [NK][4][8][8];   // [k][method][a][b]
    real sq [NK][4];
    for (int g = 0; g < NK; g++) for (int m = 0; m < 4; m++) err[g][m] = 0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < 64; n++) begin
        xr[n] = real'(int'($urandom_range(255)) - 128);
        xi[n] = real'(int'($urandom_range(255)) - 128);
      end
      // stage 1 and twiddle products
      for (int a = 0; a < 8; a++) begin
        int s1r [8], s1i [8];
        for (int i = 0; i < 8; i++) begin
          bx_re[i] = 8'($rtoi(xr[8 * i + a]));
          bx_im[i] = 8'($rtoi(xi[8 * i + a]));
        end
        #1;
        for (int p = 0; p < 8; p++) begin
          int vr, vi;
          vr = int'(by_re[p]); vi = int'(by_im[p]);
          if (vr > 1023 || vr < -1024 || vi > 1023 || vi < -1024) n_sat++;
          s1r[rev3(p)] = (vr > 1023) ? 1023 : (vr < -1024) ? -1024 : vr;
          s1i[rev3(p)] = (vi > 1023) ? 1023 : (vi < -1024) ? -1024 : vi;
        end
        for (int b = 0; b < 8; b++) begin
          ar = 11'(s1r[b]); ai = 11'(s1i[b]);
          tk[0] = 6'((a * b) % 64);
          #1;
          for (int g = 0; g < NK; g++) begin
            longint rr, ii, ri, ir;
            int k;
            k = 8 + g;
            for (int m = 0; m < 2; m++) begin
              yr[g][m][a][b] = prod_re[g][m];
              yi[g][m][a][b] = prod_im[g][m];
            end
            rr = longint'(s1r[b]) * longint'(twr[0]);
            ii = longint'(s1i[b]) * longint'(twi[0]);
            ri = longint'(s1r[b]) * longint'(twi[0]);
            ir = longint'(s1i[b]) * longint'(twr[0]);
            yr[g][2][a][b] = real'(fdiv(rr, k) - fdiv(ii, k)) * real'(1 << k) / 256.0;
            yi[g][2][a][b] = real'(fdiv(ri, k) + fdiv(ir, k)) * real'(1 << k) / 256.0;
            yr[g][3][a][b] = yr[g][2][a][b];
            yi[g][3][a][b] = real'(fdiv(ri, k) + fdiv(ir, k) + 1) * real'(1 << k) / 256.0;
          end
        end
      end
      // stage 2 (double precision) and comparison with the exact DFT
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++) begin
          int kb;
          real rr, ri;
          kb = b + 8 * c;
          rr = 0; ri = 0;
          for (int n = 0; n < 64; n++) begin
            real cs, sn;
            cs = $cos(2.0 * PI * kb * n / 64.0); sn = -$sin(2.0 * PI * kb * n / 64.0);
            rr += xr[n] * cs - xi[n] * sn;
            ri += xr[n] * sn + xi[n] * cs;
          end
          sig += rr * rr + ri * ri;
          for (int g = 0; g < NK; g++)
            for (int m = 0; m < 4; m++) begin
              real zr, zi;
              zr = 0; zi = 0;
              for (int a = 0; a < 8; a++) begin
                real cs, sn;
                cs = $cos(2.0 * PI * a * c / 8.0); sn = -$sin(2.0 * PI * a * c / 8.0);
                zr += yr[g][m][a][b] * cs - yi[g][m][a][b] * sn;
                zi += yr[g][m][a][b] * sn + yi[g][m][a][b] * cs;
              end
              err[g][m] += (rr - zr) * (rr - zr) + (ri - zi) * (ri - zi);
            end
        end
    end
    for (int g = 0; g < NK; g++) begin
      for (int m = 0; m < 4; m++) sq[g][m] = 10.0 * $log10(sig / err[g][m]);
      $display("k = %0d: SQNR direct %0.2f dB, Type III %0.2f dB, post truncation %0.2f dB, post truncation imag +1 %0.2f dB",
               8 + g, sq[g][0], sq[g][1], sq[g][2], sq[g][3]);
      checks += 3;
      if (sq[g][3] < sq[g][2] + 1.0) failures++;
      if (sq[g][1] < sq[g][0] + 5.0) failures++;
      if (sq[g][1] < sq[g][2] - 2.5 || sq[g][1] > sq[g][2] + 2.5) failures++;
      if (g > 0) begin
        checks += 4;
        for (int m = 0; m < 4; m++) if (sq[g][m] >= sq[g-1][m]) failures++;
      end
    end
    $display("first-stage outputs saturated: %0d of %0d", n_sat, FRAMES * 128);
    checks++;
    if (n_sat * 1000 > FRAMES * 128) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

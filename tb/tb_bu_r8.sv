// tb_bu_r8: checks the radix-2^3 butterfly against a floating-point 8-point
// DFT (output p must hold bin rev3(p); tolerance covers the 181/256
// approximation of 1/sqrt2) and the radix-2^2 mode against two exact
// integer 4-point DFTs (output p of each half holds bin rev2(p)).
`timescale 1ns/1ps
module tb_bu_r8;
  int checks = 0, failures = 0;
  logic signed [11:0] x_re [8], x_im [8];
  logic               radix4;
  logic signed [15:0] y_re [8], y_im [8];

  bu_r8 dut (.*);

  function automatic int rev3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < 8; i++) begin
        x_re[i] = 12'($urandom); x_im[i] = 12'($urandom);
        if (t == 0) begin x_re[i] = -12'sd2048; x_im[i] = -12'sd2048; end
        if (t == 1) begin x_re[i] = (i % 2) ? 12'sd2047 : -12'sd2048; x_im[i] = (i % 4 < 2) ? 12'sd2047 : -12'sd2048; end
      end
      radix4 = 1'b0;
      #1;
      for (int k = 0; k < 8; k++) begin
        real er, ei;
        int p;
        er = 0; ei = 0;
        for (int n = 0; n < 8; n++) begin
          real c, s;
          c = $cos(2.0 * 3.14159265358979 * k * n / 8.0);
          s = -$sin(2.0 * 3.14159265358979 * k * n / 8.0);
          er += x_re[n] * c - x_im[n] * s;
          ei += x_re[n] * s + x_im[n] * c;
        end
        p = rev3(k);
        checks++;
        if (real'(y_re[p]) - er > 8.0 || real'(y_re[p]) - er < -8.0 ||
            real'(y_im[p]) - ei > 8.0 || real'(y_im[p]) - ei < -8.0) begin
          failures++;
          if (failures < 10) $display("FAIL r8 bin %0d got (%0d,%0d) exp (%f,%f)", k, y_re[p], y_im[p], er, ei);
        end
      end
      radix4 = 1'b1;
      #1;
      for (int h = 0; h < 8; h += 4) begin
        int a0r, a0i, a1r, a1i, a2r, a2i, a3r, a3i;
        int er [4], ei [4];
        a0r = x_re[h]; a1r = x_re[h+1]; a2r = x_re[h+2]; a3r = x_re[h+3];
        a0i = x_im[h]; a1i = x_im[h+1]; a2i = x_im[h+2]; a3i = x_im[h+3];
        er[0] = a0r + a1r + a2r + a3r;  ei[0] = a0i + a1i + a2i + a3i;
        er[1] = a0r + a1i - a2r - a3i;  ei[1] = a0i - a1r - a2i + a3r;   // W4 = -j
        er[2] = a0r - a1r + a2r - a3r;  ei[2] = a0i - a1i + a2i - a3i;
        er[3] = a0r - a1i - a2r + a3i;  ei[3] = a0i + a1r - a2i - a3r;
        for (int k = 0; k < 4; k++) begin
          int p;
          p = h + ((k & 1) << 1 | (k >> 1));
          checks++;
          if (int'(y_re[p]) != er[k] || int'(y_im[p]) != ei[k]) begin
            failures++;
            if (failures < 10) $display("FAIL r4 bin %0d got (%0d,%0d) exp (%0d,%0d)", k, y_re[p], y_im[p], er[k], ei[k]);
          end
        end
      end
    end
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

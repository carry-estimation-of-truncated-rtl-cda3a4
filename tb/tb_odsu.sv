// tb_odsu: checks the overflow detection and scaling unit. Vectors of
// eight complex 16-bit values are drawn at random magnitudes; the reference
// shift is the smallest s with every part >>> s inside [-2048, 2047], and
// every output must equal its input >>> s. With en = 0 the shift must be 0
// and the parts saturated.
`timescale 1ns/1ps
module tb_odsu;
  int checks = 0, failures = 0;
  logic               en;
  logic signed [15:0] x_re [8], x_im [8];
  logic signed [11:0] y_re [8], y_im [8];
  logic        [2:0]  shift;
  int hist [5];

  odsu dut (.*);

  function automatic int sat12(input int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction

  initial begin
    for (int i = 0; i < 5; i++) hist[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      int mag, s;
      mag = 1 << $urandom_range(15, 9);
      for (int i = 0; i < 8; i++) begin
        x_re[i] = 16'(int'($urandom_range(2*mag - 1)) - mag);
        x_im[i] = 16'(int'($urandom_range(2*mag - 1)) - mag);
      end
      en = 1'b1;
      #1;
      s = 4;
      for (int c = 4; c >= 0; c--) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 8; i++)
          if ((int'(x_re[i]) >>> c) > 2047 || (int'(x_re[i]) >>> c) < -2048 ||
              (int'(x_im[i]) >>> c) > 2047 || (int'(x_im[i]) >>> c) < -2048) ok = 0;
        if (ok) s = c;
      end
      hist[s]++;
      checks++;
      if (int'(shift) != s) begin
        failures++;
        if (failures < 10) $display("FAIL shift %0d expected %0d", shift, s);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(y_re[i]) != (int'(x_re[i]) >>> s) || int'(y_im[i]) != (int'(x_im[i]) >>> s)) failures++;
      end
      en = 1'b0;
      #1;
      checks++;
      if (shift != 0) failures++;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(y_re[i]) != sat12(x_re[i]) || int'(y_im[i]) != sat12(x_im[i])) failures++;
      end
    end
    $display("shift histogram: %0d %0d %0d %0d %0d", hist[0], hist[1], hist[2], hist[3], hist[4]);
    for (int i = 0; i < 5; i++) begin checks++; if (hist[i] == 0) failures++; end
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

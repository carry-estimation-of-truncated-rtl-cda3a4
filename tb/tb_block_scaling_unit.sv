// tb_block_scaling_unit: random mantissas and exponents; checks the common
// exponent (the maximum), the alignment (each part >>> (max - own)) and
// the saturating exponent update base + shift1 + shift2.
`timescale 1ns/1ps
module tb_block_scaling_unit;
  int checks = 0, failures = 0;
  logic signed [11:0] x_re [8], x_im [8], y_re [8], y_im [8];
  logic        [4:0]  x_exp [8];
  logic        [4:0]  blk_exp, base_exp, out_exp;
  logic        [2:0]  shift1;
  logic        [1:0]  shift2;

  block_scaling_unit dut (.*);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int mx, sum;
      mx = 0;
      for (int i = 0; i < 8; i++) begin
        x_re[i] = 12'($urandom); x_im[i] = 12'($urandom);
        x_exp[i] = 5'($urandom_range((t % 2) ? 31 : 6));
        if (int'(x_exp[i]) > mx) mx = x_exp[i];
      end
      base_exp = 5'($urandom); shift1 = 3'($urandom_range(4)); shift2 = 2'($urandom_range(2));
      #1;
      checks++;
      if (int'(blk_exp) != mx) failures++;
      for (int i = 0; i < 8; i++) begin
        int d;
        d = mx - int'(x_exp[i]);
        checks++;
        if (int'(y_re[i]) != (int'(x_re[i]) >>> d) || int'(y_im[i]) != (int'(x_im[i]) >>> d)) begin
          failures++;
          if (failures < 10) $display("FAIL align %0d: %0d >>> %0d -> %0d", i, x_re[i], d, y_re[i]);
        end
      end
      sum = int'(base_exp) + int'(shift1) + int'(shift2);
      if (sum > 31) sum = 31;
      checks++;
      if (int'(out_exp) != sum) failures++;
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

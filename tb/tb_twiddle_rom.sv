// tb_twiddle_rom: checks every entry of the 2048-point twiddle table on two
// read ports against cos/-sin rounded to 9 bits (8 fraction bits) and
// clamped to [-256, 255].
`timescale 1ns/1ps
module tb_twiddle_rom;
  int checks = 0, failures = 0;
  logic        [10:0] k  [2];
  logic signed [8:0]  wr [2], wi [2];

  twiddle_rom #(.NP(2)) dut (.k(k), .wr(wr), .wi(wi));

  function automatic int q(input real v);
    int r;
    r = $rtoi(v >= 0.0 ? v * 256.0 + 0.5 : v * 256.0 - 0.5);
    if (r > 255) r = 255;
    if (r < -256) r = -256;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 2048; i++) begin
      real a;
      k[0] = 11'(i); k[1] = 11'(2047 - i);
      #1;
      a = 2.0 * 3.14159265358979323846 * i / 2048.0;
      checks++;
      if (int'(wr[0]) != q($cos(a)) || int'(wi[0]) != q(-$sin(a))) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d w=(%0d,%0d) exp=(%0d,%0d)", i, wr[0], wi[0], q($cos(a)), q(-$sin(a)));
      end
      a = 2.0 * 3.14159265358979323846 * (2047 - i) / 2048.0;
      checks++;
      if (int'(wr[1]) != q($cos(a)) || int'(wi[1]) != q(-$sin(a))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

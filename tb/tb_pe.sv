// tb_pe: checks the processing engine against floating-point arithmetic.
//
// Groups of eight random words with random block exponents are issued back
// to back, in all four stages with random twiddle steps. For a radix-2^3
// stage, output p must approximate bin rev3(p) of the 8-point DFT of the
// inputs (value = mantissa * 2^exponent), multiplied by
// W_2048^(rev3(p) * tw_step); in the radix-2^2 stage, output p of each half
// must approximate bin rev2(p) of that half's 4-point DFT. The tolerance is
// a few LSBs at the output exponent plus the alignment loss at the input
// exponent. Every result must appear exactly two cycles after its group.
`timescale 1ns/1ps
module tb_pe;
  import trunc_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, radix4 = 0, out_valid;
  sample_t x_re [8], x_im [8], y_re [8], y_im [8];
  bexp_t x_exp [8], y_exp;
  logic [10:0] tw_step = '0;

  pe dut (.*);
  always #5 clk = ~clk;

  typedef struct {
    real er [8];
    real ei [8];
    real tol;
    int  issue_cycle;
  } expect_t;
  expect_t q [$];
  int cycle = 0;

  function automatic int rev3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  function automatic expect_t model(input bit r4, input int step);
    expect_t e;
    real vr [8], vi [8];
    int mx = 0;
    for (int i = 0; i < 8; i++) begin
      vr[i] = real'(x_re[i]) * real'(1 << x_exp[i]);
      vi[i] = real'(x_im[i]) * real'(1 << x_exp[i]);
      if (int'(x_exp[i]) > mx) mx = x_exp[i];
    end
    for (int p = 0; p < 8; p++) begin
      real ar, ai;
      ar = 0; ai = 0;
      if (!r4) begin
        int k;
        real wr, wi, tr;
        k = rev3(p);
        for (int n = 0; n < 8; n++) begin
          real c, s;
          c = $cos(2.0 * PI * k * n / 8.0); s = -$sin(2.0 * PI * k * n / 8.0);
          ar += vr[n] * c - vi[n] * s;
          ai += vr[n] * s + vi[n] * c;
        end
        wr = $cos(2.0 * PI * ((k * step) % 2048) / 2048.0);
        wi = -$sin(2.0 * PI * ((k * step) % 2048) / 2048.0);
        tr = ar * wr - ai * wi;
        ai = ar * wi + ai * wr;
        ar = tr;
      end else begin
        int h, k;
        h = (p / 4) * 4;
        k = ((p & 1) << 1) | ((p >> 1) & 1);
        for (int n = 0; n < 4; n++) begin
          real c, s;
          c = $cos(2.0 * PI * k * n / 4.0); s = -$sin(2.0 * PI * k * n / 4.0);
          ar += vr[h+n] * c - vi[h+n] * s;
          ai += vr[h+n] * s + vi[h+n] * c;
        end
      end
      e.er[p] = ar; e.ei[p] = ai;
    end
    e.tol = 16.0 * real'(1 << mx);
    return e;
  endfunction

  int n_out = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      expect_t e;
      real sc;
      e = q.pop_front();
      checks++;
      // issue_cycle counts the edge before the one that takes the group
      if (cycle - e.issue_cycle != 3) begin failures++; $display("FAIL latency %0d", cycle - e.issue_cycle); end
      sc = real'(1 << y_exp);
      for (int p = 0; p < 8; p++) begin
        real dr, di;
        dr = real'(y_re[p]) * sc - e.er[p];
        di = real'(y_im[p]) * sc - e.ei[p];
        checks++;
        if (dr > e.tol + 6.0 * sc || dr < -e.tol - 6.0 * sc || di > e.tol + 6.0 * sc || di < -e.tol - 6.0 * sc) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d got (%0d,%0d)*2^%0d exp (%f,%f)", p, y_re[p], y_im[p], y_exp, e.er[p], e.ei[p]);
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      expect_t e;
      int st;
      @(negedge clk);
      st = t % 4;
      in_valid = ($urandom_range(3) != 0);
      radix4   = (st == 3);
      tw_step  = (st == 3) ? '0 : 11'($urandom_range(255) << (3 * st));
      for (int i = 0; i < 8; i++) begin
        x_re[i] = sample_t'($urandom); x_im[i] = sample_t'($urandom);
        x_exp[i] = bexp_t'((t % 3 == 0) ? 0 : $urandom_range(3));
      end
      if (in_valid) begin
        e = model(radix4, int'(tw_step));
        e.issue_cycle = cycle;
        q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("%0d groups checked", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

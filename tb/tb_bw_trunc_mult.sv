// tb_bw_trunc_mult: self-checking test of the fixed-width Baugh-Wooley
// multiplier.
//
// All 65536 pairs of the 8-bit multiplier are run for every compensation
// method. The reference takes the exact product, subtracts the value of the
// dropped columns (computed from the individual partial-product bits) to
// get the kept part, and adds the carry formula evaluated in real
// arithmetic. Mean absolute errors are compared with the published figures
// for direct truncation (576.25) and Type I (92.05), and with this design's
// own values for Type II (100.014) and Type III (100.669). A 16-bit Type III
// multiplier is checked on random operands.
`timescale 1ns/1ps
module tb_bw_trunc_mult;
  import trunc_pkg::*;

  int checks = 0, failures = 0;

  function automatic longint ref_bw(input longint a, input longint b, input int n, input int method);
    longint low = 0, beta = 0, asum = 0, kept, carry = 0;
    int alo = 0, bhi = 0, d, e;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int pp;
        pp = int'(((a >>> j) & 1) & ((b >>> i) & 1));
        if ((i == n - 1) != (j == n - 1)) pp = 1 - pp;
        if (i + j < n - 1) low += longint'(pp) << (i + j);
        if (i + j == n - 1) begin
          low += longint'(pp) << (i + j);
          beta += pp;
          if (i == 0) alo = pp;
          if (i == n - 1) bhi = pp;
        end
      end
    for (int j = 0; j < n - 1; j++) asum += (a >>> j) & 1;
    kept = (a * b - low) >>> n;            // exact: low columns removed
    d = int'(beta) - bhi;
    case (n)
      8:  e = (d + 1) / 2;
      10: e = (d == 0) ? 0 : (d + 2) / 2;
      14, 16: e = (d + 3) / 2;
      default: e = (d + 2) / 2;
    endcase
    case (method)
      1: carry = $rtoi($ceil(0.5 * beta + 0.25 * asum - 0.5));
      2: carry = $rtoi($floor(0.5 * beta + (beta - alo) / 6.0 + (n - 1) / 12.0 + 0.5));
      3: carry = $rtoi($floor(0.5 * beta + 0.5 * (e - 1) + 1.0));
      default: carry = 0;
    endcase
    return kept + carry;
  endfunction

  logic signed [7:0] a8, b8;
  logic signed [7:0] p8 [4];
  bw_trunc_mult #(.N(8), .METHOD(COMP_NONE))  u0 (.a(a8), .b(b8), .p(p8[0]));
  bw_trunc_mult #(.N(8), .METHOD(COMP_TYPE1)) u1 (.a(a8), .b(b8), .p(p8[1]));
  bw_trunc_mult #(.N(8), .METHOD(COMP_TYPE2)) u2 (.a(a8), .b(b8), .p(p8[2]));
  bw_trunc_mult                               u3 (.a(a8), .b(b8), .p(p8[3]));

  logic signed [15:0] a16, b16, p16;
  bw_trunc_mult #(.N(16)) u16 (.a(a16), .b(b16), .p(p16));

  real exp_mae [4] = '{576.25, 92.05, 100.014, 100.669};

  initial begin
    longint es [4];
    for (int m = 0; m < 4; m++) es[m] = 0;
    for (int ai = -128; ai < 128; ai++)
      for (int bi = -128; bi < 128; bi++) begin
        a8 = 8'(ai); b8 = 8'(bi);
        #1;
        for (int m = 0; m < 4; m++) begin
          longint r, dd;
          r  = ref_bw(longint'(ai), longint'(bi), 8, m);
          dd = longint'(p8[m]) * 256 - longint'(ai * bi);
          es[m] += (dd < 0) ? -dd : dd;
          checks++;
          if (longint'(p8[m]) != r) begin
            failures++;
            if (failures < 10) $display("FAIL n=8 m=%0d a=%0d b=%0d p=%0d ref=%0d", m, ai, bi, p8[m], r);
          end
        end
      end
    for (int m = 0; m < 4; m++) begin
      real mae;
      mae = real'(es[m]) / 65536.0;
      $display("n=8 method %0d mean |error| = %f (expected %f)", m, mae, exp_mae[m]);
      checks++;
      if (mae < exp_mae[m] - 0.01 || mae > exp_mae[m] + 0.01) failures++;
    end
    for (int k = 0; k < 20000; k++) begin
      longint r;
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (k == 0) begin a16 = 16'sh8000; b16 = 16'sh8000; end
      if (k == 1) begin a16 = 16'sh7fff; b16 = 16'sh8000; end
      #1;
      r = ref_bw(longint'(a16), longint'(b16), 16, 3);
      checks++;
      if (p16 != 16'(r)) begin
        failures++;
        if (failures < 10) $display("FAIL n=16 a=%0d b=%0d p=%0d ref=%0d", a16, b16, p16, r);
      end
    end
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

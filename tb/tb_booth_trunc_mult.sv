// tb_booth_trunc_mult: self-checking test of the truncated Booth multiplier.
//
// 1. 8x8 multipliers keeping 8 bits, one per compensation method, are run
//    over all 65536 operand pairs. Each output is compared with an integer
//    model written independently here (Booth digits as integers, each row
//    floor-divided by 2^T), and the mean absolute error
//    sum|p*2^8 - a*b| / 2^16 is compared with the published figures:
//    direct 384.25, Type I 84.59, Type II 88.77, Type III 88.77.
// 2. The default 12x9 multiplier dropping 6 bits (Type III, carry
//    floor(beta/2)+1) is checked on random operands and all corner values.
`timescale 1ns/1ps
module tb_booth_trunc_mult;
  import trunc_pkg::*;

  int checks = 0, failures = 0;

  // ---- reference model -------------------------------------------------
  function automatic longint fdiv(input longint x, input int t);
    // floor(x / 2^t)
    return x >>> t;
  endfunction

  function automatic longint ref_mult(input longint a, input longint b,
                                      input int aw, input int bw, input int t,
                                      input int method);
    int nr = (bw + 1) / 2;
    longint kept = 0, beta = 0, ynz = 0, carry = 0;
    longint lam_q = 0;
    for (int i = 0; i < nr; i++) begin
      int b2p1, b2, b2m1, y, neg;
      longint r, rpat;
      b2p1 = int'((b >>> (((2*i+1) < bw) ? 2*i+1 : bw-1)) & 1);
      b2   = int'((b >>> (((2*i) < bw) ? 2*i : bw-1)) & 1);
      b2m1 = (i == 0) ? 0 : int'((b >>> (((2*i-1) < bw) ? 2*i-1 : bw-1)) & 1);
      y    = -2*b2p1 + b2 + b2m1;
      neg  = (b2p1 == 1 && !(b2 == 1 && b2m1 == 1)) ? 1 : 0;
      // row value before +n_i: |y|*a, or its one's complement
      r    = (y < 0 ? -y : y) * a;
      if (neg == 1) r = -r - 1;
      if (y == 0) r = neg ? -1 : 0;
      kept += fdiv(r * (longint'(1) << (2*i)), t);
      if (2*i >= t) kept += longint'(neg) << (2*i - t);
      rpat = r & ((longint'(1) << (aw + 1)) - 1);
      if (t - 1 - 2*i >= 0 && t - 1 - 2*i <= aw) beta += (rpat >> (t - 1 - 2*i)) & 1;
      if (2*i == t - 1) beta += neg;
      if (i < nr - 1 && y != 0) ynz++;
    end
    for (int c = 0; c < t - 1; c++) begin
      int cnt = 0;
      for (int i = 0; i < nr; i++) begin
        if (c >= 2*i && c <= 2*i + aw) cnt++;
        if (c == 2*i) cnt++;
      end
      lam_q += longint'(cnt) << c;   // lambda3 = 3/8 * lam_q / 2^t
    end
    case (method)
      1: carry = $rtoi($floor(0.5 * beta + 0.25 * ynz + 0.5));
      2: carry = $rtoi($floor(0.6 * beta + 0.15 * nr + 0.5));
      3: carry = $rtoi($floor(0.5 * beta + 0.375 * real'(lam_q) / real'(longint'(1) << t) + 0.5));
      default: carry = 0;
    endcase
    return kept + carry;
  endfunction

  // ---- 8x8 exhaustive -------------------------------------------------
  logic signed [7:0] a8, b8;
  logic signed [7:0] p8 [4];
  booth_trunc_mult #(.AW(8), .BW(8), .TRUNC(8), .METHOD(COMP_NONE))  u8_0 (.a(a8), .b(b8), .p(p8[0]));
  booth_trunc_mult #(.AW(8), .BW(8), .TRUNC(8), .METHOD(COMP_TYPE1)) u8_1 (.a(a8), .b(b8), .p(p8[1]));
  booth_trunc_mult #(.AW(8), .BW(8), .TRUNC(8), .METHOD(COMP_TYPE2)) u8_2 (.a(a8), .b(b8), .p(p8[2]));
  booth_trunc_mult #(.AW(8), .BW(8), .TRUNC(8), .METHOD(COMP_TYPE3)) u8_3 (.a(a8), .b(b8), .p(p8[3]));

  // ---- default 12x9 / 6 -----------------------------------------------
  logic signed [11:0] a12;
  logic signed [8:0]  b9;
  logic signed [14:0] p15;
  booth_trunc_mult dut (.a(a12), .b(b9), .p(p15));

  real pub_mae [4] = '{384.25, 84.59, 88.77, 88.77};

  task automatic check12(input int av, input int bv);
    longint r;
    a12 = 12'(av); b9 = 9'(bv);
    #1;
    r = ref_mult(longint'(a12), longint'(b9), 12, 9, 6, 3);
    checks++;
    if (longint'(p15) != r) begin
      failures++;
      if (failures < 10) $display("FAIL 12x9 a=%0d b=%0d p=%0d ref=%0d", a12, b9, p15, r);
    end
  endtask

  initial begin
    longint err_sum [4];
    for (int m = 0; m < 4; m++) err_sum[m] = 0;
    for (int ai = -128; ai < 128; ai++) begin
      for (int bi = -128; bi < 128; bi++) begin
        a8 = 8'(ai); b8 = 8'(bi);
        #1;
        for (int m = 0; m < 4; m++) begin
          longint r, d;
          r = ref_mult(longint'(ai), longint'(bi), 8, 8, 8, m);
          d = longint'(p8[m]) * 256 - longint'(ai) * longint'(bi);
          err_sum[m] += (d < 0) ? -d : d;
          if (longint'(p8[m]) != r) begin
            failures++;
            if (failures < 10) $display("FAIL 8x8 m=%0d a=%0d b=%0d p=%0d ref=%0d", m, ai, bi, p8[m], r);
          end
        end
      end
    end
    checks += 4 * 65536;
    for (int m = 0; m < 4; m++) begin
      real mae;
      mae = real'(err_sum[m]) / 65536.0;
      $display("8x8 method %0d mean |error| = %f (published %f)", m, mae, pub_mae[m]);
      checks++;
      if (mae < pub_mae[m] - 0.01 || mae > pub_mae[m] + 0.01) failures++;
    end
    // 12x9: corners and random
    for (int ai = -2048; ai < 2048; ai += 511) for (int bi = -256; bi < 256; bi += 31) check12(ai, bi);
    check12(-2048, -256); check12(2047, 255); check12(-2048, 255); check12(2047, -256);
    for (int k = 0; k < 20000; k++) check12(int'($urandom_range(4095)) - 2048, int'($urandom_range(511)) - 256);
    // Mean absolute error of the 12x9 -> 15 multiplier over all 2^21 pairs;
    // published: direct truncation 72.25, Type III 22.77.
    begin
      longint es;
      real mae12;
      es = 0;
      for (int ai = -2048; ai < 2048; ai++) begin
        for (int bi = -256; bi < 256; bi++) begin
          longint d;
          a12 = 12'(ai); b9 = 9'(bi);
          #1;
          d = longint'(p15) * 64 - longint'(ai) * longint'(bi);
          es += (d < 0) ? -d : d;
        end
      end
      mae12 = real'(es) / real'(1 << 21);
      $display("12x9/6 Type III mean |error| = %f (published 22.77)", mae12);
      checks++;
      if (mae12 < 22.77 - 0.1 || mae12 > 22.77 + 0.1) failures++;
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

// tb_fft2048_top: end-to-end test of the 2048-point FFT/IFFT processor at
// its full size.
//
// Four transforms are run:
//   1. forward FFT of a constant (DC): all energy must land in bin 0;
//   2. forward FFT of three tones plus noise, near full scale;
//   3. forward FFT of uniform random full-scale samples;
//   4. inverse FFT of uniform random samples.
// Each output bin (out * 2^out_exp) is compared with a double-precision DFT
// computed here, and the signal-to-quantisation-noise ratio
// 10 log10(sum|Xref|^2 / sum|Xref - X|^2) must exceed 40 dB (the published
// fixed-point 2048-point design reaches about 48 dB). The cycle count from
// start to done is checked against the controller's schedule, and the
// mechanisms of the design are counted and must each occur: ODSU1 scaling,
// ODSU2 scaling, exponent alignment of unequal inputs, radix-2^2 mode,
// twiddle bypass for W^0, the inverse (conjugation) path, and the
// ping-pong cache (writes by the first stage of a pair, reads by the
// second). Memory traffic is counted too: per transform the main memory
// must see 2048 + 4096 writes (load, stages) and 4096 + 2048 reads
// (stages, unload), and the cache 4096 of each. Without the cache the four
// stages alone would make 8192 reads and 8192 writes of the main memory.
// A last pair of frames (forward, then inverse) is streamed in continuous
// flow: the second start comes while the first frame is being transformed,
// its samples go in while the first frame's bins come out, and the two
// done pulses must be 2048 + 20480 cycles apart; both results are checked
// for SQNR as above.
// The stand-alone Baugh-Wooley multiplier port is exercised as well.
`timescale 1ns/1ps
module tb_fft2048_top;
  import trunc_pkg::*;

  localparam int N = 2048;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic start = 0, inverse = 0, in_valid = 0;
  sample_t in_re = '0, in_im = '0;
  logic busy, done, in_ready, out_valid;
  sample_t out_re, out_im;
  bexp_t out_exp;
  logic signed [7:0] bw_a = 0, bw_b = 0, bw_p;

  fft2048_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_odsu1 = 0, n_odsu2 = 0, n_align = 0, n_radix4 = 0, n_bypass = 0, n_inverse = 0;
  int n_stream_io = 0;
  int n_cache_wr = 0, n_cache_rd = 0, n_main_rd = 0, n_main_wr = 0, n_done = 0;

  // mechanism counters, observed inside the engine
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cache.we) n_cache_wr++;
    if (dut.u_cache.re) n_cache_rd++;
    if (dut.u_mem.we)   n_main_wr++;
    if (dut.u_mem.re)   n_main_rd++;
    if (done)           n_done++;
    if (in_valid && in_ready && out_valid) n_stream_io++;
    if (dut.u_pe.in_valid) begin
      if (dut.u_pe.shift1 != 0) n_odsu1++;
      if (dut.u_pe.radix4) n_radix4++;
      for (int p = 0; p < 8; p++) if (dut.u_pe.x_exp[p] != dut.u_pe.blk_exp) begin n_align++; break; end
    end
    if (dut.u_pe.r1_valid) begin
      if (dut.u_pe.shift2 != 0) n_odsu2++;
      if (!dut.u_pe.r1_radix4) for (int p = 1; p < 8; p++) if (dut.u_pe.r1_k[p] == 0) begin n_bypass++; break; end
    end
  end

  real xr [N], xi [N];
  real cs [N], sn [N];
  real yr [N], yi [N];

  initial for (int k = 0; k < N; k++) begin
    cs[k] = $cos(2.0 * PI * k / N);
    sn[k] = $sin(2.0 * PI * k / N);
  end

  task automatic run(input bit inv, output int cycles);
    int ni, no, t0;
    @(negedge clk);
    inverse = inv; start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    ni = 0; no = 0;
    fork
      begin
        while (ni < N) begin
          in_valid = 1; in_re = sample_t'($rtoi(xr[ni])); in_im = sample_t'($rtoi(xi[ni]));
          @(posedge clk);
          if (in_ready) ni++;
          #1;
        end
        in_valid = 0;
      end
      begin
        while (!done) begin
          @(posedge clk);
          t0++;
          if (out_valid) begin
            yr[no] = real'(out_re) * real'(1 << out_exp);
            yi[no] = real'(out_im) * real'(1 << out_exp);
            no++;
          end
        end
      end
    join
    cycles = t0;
    checks++;
    if (no != N) begin failures++; $display("FAIL: %0d outputs", no); end
  endtask

  // two frames in continuous flow: frame 0 forward from xs*[0], frame 1
  // inverse from xs*[1]; results into ys*[f]
  real xsr [2][N], xsi [2][N], ysr [2][N], ysi [2][N];
  task automatic run_stream(output int period);
    int no, t, td [2], nd;
    no = 0; t = 0; nd = 0;
    fork
      begin
        for (int f = 0; f < 2; f++) begin
          int ni;
          @(negedge clk);
          start = 1; inverse = (f == 1);
          @(negedge clk);
          start = 0;
          ni = 0;
          while (ni < N) begin
            in_valid = 1;
            in_re = sample_t'($rtoi(xsr[f][ni])); in_im = sample_t'($rtoi(xsi[f][ni]));
            @(posedge clk);
            if (in_ready) ni++;
            #1;
          end
          in_valid = 0;
        end
      end
      begin
        while (nd < 2) begin
          @(posedge clk);
          t++;
          if (out_valid) begin
            ysr[no / N][no % N] = real'(out_re) * real'(1 << out_exp);
            ysi[no / N][no % N] = real'(out_im) * real'(1 << out_exp);
            no++;
          end
          if (done) begin td[nd] = t; nd++; end
        end
      end
    join
    period = td[1] - td[0];
    checks++;
    if (no != 2 * N) begin failures++; $display("FAIL: %0d streamed outputs", no); end
  endtask

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real sqnr(input bit inv);
    real sig = 0, err = 0;
    for (int k = 0; k < N; k++) begin
      real ar = 0, ai = 0;
      for (int n = 0; n < N; n++) begin
        int idx = (k * n) % N;
        real c = cs[idx], s = inv ? sn[idx] : -sn[idx];
        ar += xr[n] * c - xi[n] * s;
        ai += xr[n] * s + xi[n] * c;
      end
      sig += ar * ar + ai * ai;
      err += (ar - yr[k]) * (ar - yr[k]) + (ai - yi[k]) * (ai - yi[k]);
    end
    return 10.0 * $log10(sig / err);
  endfunction

  task automatic check_run(input string name, input bit inv);
    int cyc;
    real q;
    run(inv, cyc);
    q = sqnr(inv);
    $display("%s: %0d cycles, SQNR %0.2f dB", name, cyc, q);
    checks++;
    if (q < 40.0) begin failures++; $display("FAIL: SQNR of %s too low", name); end
    // schedule: load 2048 + 1024 groups * 20 + unload 2048 + 1 + turnarounds
    checks++;
    if (cyc < 2048 + 20480 + 2048 || cyc > 2048 + 20480 + 2048 + 8) begin
      failures++; $display("FAIL: cycle count %0d", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. DC
    for (int n = 0; n < N; n++) begin xr[n] = 1000; xi[n] = -500; end
    check_run("DC", 0);
    checks++;
    if (yr[0] != 1000.0 * N || yi[0] != -500.0 * N) begin
      // block floating point may drop low bits; require 0.1 % accuracy
      if (fabs(yr[0] - 1000.0 * N) > 2048 || fabs(yi[0] + 500.0 * N) > 2048) begin
        failures++; $display("FAIL: DC bin %f %f", yr[0], yi[0]);
      end
    end
    for (int k = 1; k < N; k++) begin
      checks++;
      if (fabs(yr[k]) > 512 || fabs(yi[k]) > 512) begin
        failures++; if (failures < 10) $display("FAIL: DC leak bin %0d %f %f", k, yr[k], yi[k]);
      end
    end

    // 2. tones + noise
    for (int n = 0; n < N; n++) begin
      xr[n] = $floor(600.0 * $cos(2.0 * PI * 37 * n / N) + 500.0 * $cos(2.0 * PI * 700 * n / N + 1.0)
                     + 300.0 * $sin(2.0 * PI * 1500 * n / N) + real'($urandom_range(200)) - 100.0);
      xi[n] = $floor(600.0 * $sin(2.0 * PI * 37 * n / N) - 400.0 * $sin(2.0 * PI * 901 * n / N)
                     + real'($urandom_range(200)) - 100.0);
    end
    check_run("tones", 0);

    // 3. random full scale
    for (int n = 0; n < N; n++) begin
      xr[n] = real'($urandom_range(4095)) - 2048.0;
      xi[n] = real'($urandom_range(4095)) - 2048.0;
    end
    check_run("random", 0);

    // 4. inverse
    for (int n = 0; n < N; n++) begin
      xr[n] = real'($urandom_range(2000)) - 1000.0;
      xi[n] = real'($urandom_range(2000)) - 1000.0;
    end
    n_inverse = 1;
    check_run("inverse", 1);

    // 5. continuous flow: forward frame, then inverse frame, back to back
    begin
      int period;
      real q;
      for (int f = 0; f < 2; f++)
        for (int n = 0; n < N; n++) begin
          xsr[f][n] = real'($urandom_range(3000)) - 1500.0;
          xsi[f][n] = real'($urandom_range(3000)) - 1500.0;
        end
      run_stream(period);
      for (int f = 0; f < 2; f++) begin
        for (int n = 0; n < N; n++) begin
          xr[n] = xsr[f][n]; xi[n] = xsi[f][n]; yr[n] = ysr[f][n]; yi[n] = ysi[f][n];
        end
        q = sqnr(f == 1);
        $display("stream frame %0d (%s): SQNR %0.2f dB", f, f ? "inverse" : "forward", q);
        checks++;
        if (q < 40.0) begin failures++; $display("FAIL: SQNR of streamed frame %0d", f); end
      end
      $display("stream: done pulses %0d cycles apart, %0d cycles with input and output together", period, n_stream_io);
      checks += 2;
      if (period != 2048 + 20480) failures++;
      if (n_stream_io < N - 1) failures++;
    end

    // stand-alone Baugh-Wooley multiplier: product within 1.5 LSB of a*b/256
    for (int k = 0; k < 2000; k++) begin
      int e;
      bw_a = 8'($urandom); bw_b = 8'($urandom);
      #1;
      e = int'(bw_p) * 256 - int'(bw_a) * int'(bw_b);
      checks++;
      if (e > 384 || e < -384) begin failures++; $display("FAIL: bw %0d*%0d -> %0d", bw_a, bw_b, bw_p); end
    end

    $display("mechanisms: odsu1 scaling %0d, odsu2 scaling %0d, alignment %0d, radix-2^2 %0d, W^0 bypass %0d, inverse %0d",
             n_odsu1, n_odsu2, n_align, n_radix4, n_bypass, n_inverse);
    $display("memory traffic over %0d transforms: main %0d reads %0d writes, cache %0d reads %0d writes",
             n_done, n_main_rd, n_main_wr, n_cache_rd, n_cache_wr);
    checks += 5;
    if (n_done == 0) failures++;
    if (n_main_rd != 6144 * n_done) failures++;
    if (n_main_wr != 6144 * n_done) failures++;
    if (n_cache_rd != 4096 * n_done) failures++;
    if (n_cache_wr != 4096 * n_done) failures++;
    checks += 6;
    if (n_odsu1 == 0) failures++;
    if (n_odsu2 == 0) failures++;
    if (n_align == 0) failures++;
    if (n_radix4 == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_inverse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

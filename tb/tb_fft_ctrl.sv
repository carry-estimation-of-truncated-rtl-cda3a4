// tb_fft_ctrl: checks the FFT control unit with the real main memory, the
// real ping-pong cache and a stand-in processing engine that returns its
// inputs unchanged two cycles later.
//
// Sample n is loaded as (re = n, im = -n). Each group handed to the engine
// must then carry, as data, the addresses it was read from; these are
// compared with the stage address rule, as is the twiddle step b * 8^stage
// and the radix-2^2 flag. The groups must come in the paired order of the
// ping-pong scheme (stage 0 groups 32*i + o for i = 0..7, then the stage 1
// groups 32*i + o; stage 2 groups 4*o + i for i = 0..3, then the same
// stage 3 groups). Because the engine changes nothing, unloading must
// return sample bitrev(k) as bin k. The inverse run must conjugate on the
// way in and out. The cycle count of a transform and the number of main
// memory and cache accesses (half of the stage traffic each) are checked.
// Finally three frames (forward, inverse, forward) are streamed in
// continuous flow: start is pulsed again while a frame is being
// transformed, and the next frame is fed while the previous one comes out.
// Frame f carries (re = n, im = -(n ^ f)); outputs must come in frame
// order, each bin with its own frame's content, and successive done pulses
// must be 2048 + 20480 cycles apart.
`timescale 1ns/1ps
module tb_fft_ctrl;
  import trunc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, inverse = 0, in_valid = 0;
  sample_t in_re = '0, in_im = '0;
  logic busy, done, in_ready, out_valid;
  sample_t out_re, out_im;
  bexp_t out_exp;
  logic [10:0] mem_raddr, mem_waddr, cache_raddr, cache_waddr;
  mem_word_t mem_rdata, mem_wdata, cache_rdata, cache_wdata;
  logic mem_we, mem_re, cache_we, cache_re, cache_pair;
  logic pe_in_valid, pe_radix4, pe_out_valid;
  sample_t pe_x_re [8], pe_x_im [8], pe_y_re [8], pe_y_im [8];
  bexp_t pe_x_exp [8], pe_y_exp;
  logic [10:0] pe_tw_step;

  fft_ctrl dut (.*);
  fft_main_mem u_mem (.clk, .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata));
  pingpong_cache u_cache (.clk, .pair(cache_pair), .re(cache_re), .raddr(cache_raddr), .rdata(cache_rdata),
                          .we(cache_we), .waddr(cache_waddr), .wdata(cache_wdata));

  // access counters
  int n_mem_rd = 0, n_mem_wr = 0, n_cache_rd = 0, n_cache_wr = 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_re)   n_mem_rd++;
    if (mem_we)   n_mem_wr++;
    if (cache_re) n_cache_rd++;
    if (cache_we) n_cache_wr++;
  end

  always #5 clk = ~clk;

  // identity engine, latency 2
  logic v1, v2;
  sample_t d1r [8], d1i [8];
  bexp_t e1;
  always_ff @(posedge clk) begin
    v1 <= rst_n & pe_in_valid;
    v2 <= rst_n & v1;
    if (pe_in_valid) begin d1r <= pe_x_re; d1i <= pe_x_im; e1 <= pe_x_exp[0]; end
    if (v1) begin pe_y_re <= d1r; pe_y_im <= d1i; pe_y_exp <= e1; end
  end
  assign pe_out_valid = v2;

  function automatic int bitrev11(input int v);
    int r = 0;
    for (int i = 0; i < 11; i++) r |= ((v >> i) & 1) << (10 - i);
    return r;
  endfunction

  // group bookkeeping
  int grp = 0, n_groups = 0;
  always @(posedge clk) if (rst_n && pe_in_valid) begin
    int s, g, stride, b, blk, exp_step, st;
    st = grp % 512;
    if (grp < 512) begin
      s = (st / 8) % 2;
      g = (st % 8) * 32 + st / 16;
    end else begin
      s = 2 + (st / 4) % 2;
      g = (st / 8) * 4 + st % 4;
    end
    stride = (s == 0) ? 256 : (s == 1) ? 32 : (s == 2) ? 4 : 1;
    b = g % stride; blk = g / stride;
    exp_step = (s == 3) ? 0 : (b * (1 << (3 * s))) % 2048;
    for (int m = 0; m < 8; m++) begin
      int a;
      a = blk * stride * 8 + b + m * stride;
      checks++;
      if (int'(pe_x_re[m]) != a) begin
        failures++;
        if (failures < 10) $display("FAIL stage %0d group %0d m %0d read %0d expected %0d", s, g, m, pe_x_re[m], a);
      end
    end
    checks += 2;
    if (int'(pe_tw_step) != exp_step) failures++;
    if (pe_radix4 != (s == 3)) failures++;
    grp = (grp + 1) % 1024;
    n_groups++;
  end

  task automatic transform(input bit inv);
    int ni, no, cyc;
    @(negedge clk);
    start = 1; inverse = inv;
    @(negedge clk);
    start = 0;
    ni = 0; no = 0; cyc = 0;
    n_mem_rd = 0; n_mem_wr = 0; n_cache_rd = 0; n_cache_wr = 0;
    fork
      begin
        while (ni < 2048) begin
          in_valid = 1; in_re = sample_t'(ni); in_im = sample_t'(-ni);
          @(posedge clk);
          if (in_ready) ni++;
          #1;
        end
        in_valid = 0;
      end
      begin
        while (!done) begin
          @(posedge clk);
          cyc++;
          if (out_valid) begin
            int src, er, ei;
            src = bitrev11(no);
            er = src;
            ei = -src;               // the inverse conjugates twice
            checks++;
            if (int'(out_re) != er || int'(out_im) != ei || out_exp != 0) begin
              failures++;
              if (failures < 10) $display("FAIL bin %0d got (%0d,%0d) exp (%0d,%0d)", no, int'(out_re), int'(out_im), er, ei);
            end
            no++;
          end
        end
      end
    join
    checks += 2;
    if (no != 2048) failures++;
    // 2048 load + 1024 groups * 20 + 2048 unload + 2 (last read, done)
    if (cyc != 2048 + 20480 + 2050) begin failures++; $display("FAIL cycles %0d", cyc); end
    // load 2048 writes; pairs: 2 x 2048 reads and writes in each memory;
    // unload 2048 reads
    checks += 4;
    if (n_mem_wr != 2048 + 4096) failures++;
    if (n_mem_rd != 4096 + 2048) failures++;
    if (n_cache_wr != 4096) failures++;
    if (n_cache_rd != 4096) failures++;
    $display("transform (inverse=%0d): %0d cycles, main memory %0d reads %0d writes, cache %0d reads %0d writes",
             inv, cyc, n_mem_rd, n_mem_wr, n_cache_rd, n_cache_wr);
  endtask

  // continuous flow: three frames back to back
  task automatic stream();
    int no, t, t_done [3], nd, n_io;
    bit invs [3] = '{0, 1, 0};
    no = 0; t = 0; nd = 0; n_io = 0;
    fork
      begin
        for (int f = 0; f < 3; f++) begin
          int ni;
          @(negedge clk);
          start = 1; inverse = invs[f];
          @(negedge clk);
          start = 0;
          ni = 0;
          while (ni < 2048) begin
            in_valid = 1; in_re = sample_t'(ni); in_im = sample_t'(-(ni ^ f));
            @(posedge clk);
            if (in_ready) ni++;
            #1;
          end
          in_valid = 0;
        end
      end
      begin
        while (nd < 3) begin
          @(posedge clk);
          t++;
          if (out_valid && in_ready && in_valid) n_io++;
          if (out_valid) begin
            int f, src, er, ei;
            f   = no / 2048;
            src = bitrev11(no % 2048);
            er  = src;
            ei  = -(src ^ f);
            checks++;
            if (int'(out_re) != er || int'(out_im) != ei) begin
              failures++;
              if (failures < 10) $display("FAIL stream frame %0d bin %0d got (%0d,%0d) exp (%0d,%0d)",
                                          f, no % 2048, int'(out_re), int'(out_im), er, ei);
            end
            no++;
          end
          if (done) begin t_done[nd] = t; nd++; end
        end
      end
    join
    $display("stream: %0d bins, done at %0d %0d %0d, %0d cycles with input and output together",
             no, t_done[0], t_done[1], t_done[2], n_io);
    checks += 4;
    if (no != 3 * 2048) failures++;
    if (t_done[1] - t_done[0] != 2048 + 20480) failures++;
    if (t_done[2] - t_done[1] != 2048 + 20480) failures++;
    if (n_io < 2 * 2048 - 2) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    transform(0);
    transform(1);
    checks++;
    if (n_groups != 2048) failures++;
    stream();
    checks++;
    if (n_groups != 2048 + 3 * 1024) failures++;
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

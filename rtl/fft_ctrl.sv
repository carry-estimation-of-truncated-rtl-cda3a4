// fft_ctrl: control unit of the in-place 2048-point FFT/IFFT processor.
//
// Sequence for one transform:
//   LOAD   - after start, in_ready is high and 2048 samples are accepted in
//            natural order (in_valid & in_ready), sample n written to
//            address n (see "address map" below) with exponent 0. For an
//            inverse transform the sample is conjugated.
//   stages - the transform is 2048 = 8 * 8 * 8 * 4: three radix-2^3 stages
//            and one radix-2^2 stage, each of 256 groups of 8 words, done in
//            place. For stage s < 3 the group stride is 256 >> 3s; group g
//            has offset b = g mod stride and block g / stride, and reads
//            addresses block*8*stride + b + m*stride, m = 0..7. The twiddle
//            step handed to the processing engine is b * 8^s. Stage 3 reads
//            8 consecutive words (two 4-point butterflies). Results go back
//            to the addresses they were read from, so the final contents
//            are in 11-bit bit-reversed order.
//            Ping-pong cache: the stages run in two pairs (0/1, then 2/3),
//            512 groups each, counted by `step`. The first stage of a pair
//            reads the main memory and writes the cache; the second reads
//            the cache and writes the main memory. Within pair 0, step
//            {o, h, i} (o: 5 bits, h, i: 3 bits) runs stage h, group
//            32*i + o; within pair 1, step {o, h, i} (o: 6 bits, h, i: 2
//            bits) runs stage 2 + h, group 4*o + i. So each run of
//            first-stage groups produces exactly the words the following
//            run of second-stage groups reads (see pingpong_cache). Both
//            memories take the same main-memory addresses.
//            Per group: READ (8 reads, one cycle of read latency), ISSUE
//            (one cycle to the engine), WAIT (engine latency), WRITE (8
//            writes); 20 cycles per group, groups do not overlap.
//   UNLOAD - bins k = 0..2047 are read from address bitrev(k) and sent out
//            in natural order, one per cycle, with out_valid; the value of
//            a bin is out * 2^out_exp (conjugated for an inverse transform,
//            no 1/N scaling). done pulses after the last bin.
//   IO     - continuous flow: if start was pulsed again while a transform
//            was running, the next frame is loaded while the finished one
//            is unloaded, in one pass over a single memory. On each cycle
//            with in_valid, bin k is read from address bitrev(k) and sample
//            k of the next frame is written to that same address (the read
//            returns the old word). So every 2048 + 20480 cycles a frame
//            goes in and one comes out; out_valid follows in_valid by a
//            cycle. inverse is sampled with each start.
// Address map: the next frame's sample n then sits at bitrev(n) instead of
// n. Because the radix-2^3 and radix-2^2 stages leave the result in the
// same bit-reversed order as radix 2, that is simply the whole address
// space seen through bitrev: a one-bit map flag, toggled by every IO pass,
// applies bitrev to every main-memory address (the cache keeps the logical
// ones), and the next unload then reads in natural order.
// Negation for conjugation saturates -2048 to 2047.
// rst_n is an active-low synchronous reset.
module fft_ctrl
  import trunc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               inverse,
  output logic               busy,
  output logic               done,
  // sample input
  output logic               in_ready,
  input  logic               in_valid,
  input  sample_t            in_re,
  input  sample_t            in_im,
  // result output
  output logic               out_valid,
  output sample_t            out_re,
  output sample_t            out_im,
  output bexp_t              out_exp,
  // main memory
  output logic               mem_re,
  output logic [FFT_AW-1:0]  mem_raddr,
  input  mem_word_t          mem_rdata,
  output logic               mem_we,
  output logic [FFT_AW-1:0]  mem_waddr,
  output mem_word_t          mem_wdata,
  // ping-pong cache
  output logic               cache_pair,
  output logic               cache_re,
  output logic [FFT_AW-1:0]  cache_raddr,
  input  mem_word_t          cache_rdata,
  output logic               cache_we,
  output logic [FFT_AW-1:0]  cache_waddr,
  output mem_word_t          cache_wdata,
  // processing engine
  output logic               pe_in_valid,
  output sample_t            pe_x_re  [8],
  output sample_t            pe_x_im  [8],
  output bexp_t              pe_x_exp [8],
  output logic               pe_radix4,
  output logic [FFT_AW-1:0]  pe_tw_step,
  input  logic               pe_out_valid,
  input  sample_t            pe_y_re  [8],
  input  sample_t            pe_y_im  [8],
  input  bexp_t              pe_y_exp
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_READ, S_ISSUE, S_WAIT, S_WRITE, S_UNLOAD, S_IO
  } state_e;

  state_e            state;
  logic              inv;          // frame being loaded / transformed
  logic              oinv;         // frame being unloaded
  logic              pend;         // start seen while busy: next frame waits
  logic              pend_inv;
  logic              map;          // main-memory addresses go through bitrev
  logic              io_fire;
  logic              last_v;       // the last bin is on the output
  logic              pair;         // 0: stages 0/1, 1: stages 2/3
  logic [8:0]        step;         // group counter within the pair
  logic              half;         // 0: main -> cache, 1: cache -> main
  logic [1:0]        stage;
  logic [7:0]        group;
  logic [FFT_AW:0]   cnt;          // load / unload / per-group counter
  logic              unload_v;     // a read issued last cycle during UNLOAD
  mem_word_t         gath [8];
  mem_word_t         scat [8];

  function automatic sample_t neg_sat(input sample_t v);
    return (v == {1'b1, {(DATA_W-1){1'b0}}}) ? {1'b0, {(DATA_W-1){1'b1}}} : -v;
  endfunction

  function automatic logic [FFT_AW-1:0] bitrev(input logic [FFT_AW-1:0] v);
    logic [FFT_AW-1:0] r;
    for (int i = 0; i < int'(FFT_AW); i++) r[i] = v[FFT_AW-1-i];
    return r;
  endfunction

  // log2 of the group stride of a stage
  function automatic int stride_log(input logic [1:0] s);
    case (s)
      2'd0:    return 8;
      2'd1:    return 5;
      2'd2:    return 2;
      default: return 0;
    endcase
  endfunction

  function automatic logic [FFT_AW-1:0] grp_addr(input logic [1:0] s, input logic [7:0] g,
                                                 input logic [2:0] m);
    int sh;
    logic [FFT_AW-1:0] b, blk;
    sh  = stride_log(s);
    b   = FFT_AW'(g) & ((FFT_AW'(1) << sh) - 1'b1);
    blk = FFT_AW'(g) >> sh;
    return (blk << (sh + 3)) + b + (FFT_AW'(m) << sh);
  endfunction

  always_comb begin
    if (!pair) begin
      half  = step[3];
      group = {step[2:0], step[8:4]};
    end else begin
      half  = step[2];
      group = {step[8:3], step[1:0]};
    end
    stage = {pair, half};
  end

  function automatic logic [FFT_AW-1:0] phys(input logic [FFT_AW-1:0] a);
    return map ? bitrev(a) : a;
  endfunction

  logic [FFT_AW-1:0] grp_b;
  assign grp_b = FFT_AW'(group) & ((FFT_AW'(1) << stride_log(stage)) - 1'b1);

  assign busy     = (state != S_IDLE);
  assign in_ready = (state == S_LOAD) || (state == S_IO);
  assign io_fire  = (state == S_IO) && in_valid;

  assign pe_in_valid = (state == S_ISSUE);
  assign pe_radix4   = (stage == 2'd3);
  assign pe_tw_step  = (stage == 2'd3) ? '0 : grp_b << (3 * int'(stage));
  always_comb begin
    for (int p = 0; p < 8; p++) begin
      pe_x_re[p]  = gath[p].re;
      pe_x_im[p]  = gath[p].im;
      pe_x_exp[p] = gath[p].e;
    end
  end

  // memory ports
  assign cache_pair = pair;
  always_comb begin
    mem_re      = 1'b0;
    mem_raddr   = '0;
    mem_we      = 1'b0;
    mem_waddr   = '0;
    mem_wdata   = '0;
    cache_re    = 1'b0;
    cache_raddr = '0;
    cache_we    = 1'b0;
    cache_waddr = '0;
    cache_wdata = '0;
    unique case (state)
      S_LOAD: begin
        mem_we    = in_valid;
        mem_waddr = phys(cnt[FFT_AW-1:0]);
        mem_wdata = '{e: '0, im: inv ? neg_sat(in_im) : in_im, re: in_re};
      end
      S_IO: begin
        mem_re    = in_valid;
        mem_raddr = phys(bitrev(cnt[FFT_AW-1:0]));
        mem_we    = in_valid;
        mem_waddr = phys(bitrev(cnt[FFT_AW-1:0]));
        mem_wdata = '{e: '0, im: inv ? neg_sat(in_im) : in_im, re: in_re};
      end
      S_READ: if (cnt < (FFT_AW+1)'(8)) begin
        if (half) begin
          cache_re    = 1'b1;
          cache_raddr = grp_addr(stage, group, cnt[2:0]);
        end else begin
          mem_re      = 1'b1;
          mem_raddr   = phys(grp_addr(stage, group, cnt[2:0]));
        end
      end
      S_WRITE: begin
        if (half) begin
          mem_we      = 1'b1;
          mem_waddr   = phys(grp_addr(stage, group, cnt[2:0]));
          mem_wdata   = scat[cnt[2:0]];
        end else begin
          cache_we    = 1'b1;
          cache_waddr = grp_addr(stage, group, cnt[2:0]);
          cache_wdata = scat[cnt[2:0]];
        end
      end
      S_UNLOAD: if (cnt < (FFT_AW+1)'(FFT_N)) begin
        mem_re    = 1'b1;
        mem_raddr = phys(bitrev(cnt[FFT_AW-1:0]));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      inv      <= 1'b0;
      oinv     <= 1'b0;
      pend     <= 1'b0;
      pend_inv <= 1'b0;
      map      <= 1'b0;
      last_v   <= 1'b0;
      pair     <= 1'b0;
      step     <= '0;
      cnt      <= '0;
      unload_v <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= last_v;
      last_v   <= 1'b0;
      unload_v <= 1'b0;
      if (start && state != S_IDLE) begin
        pend     <= 1'b1;
        pend_inv <= inverse;
      end
      unique case (state)
        S_IDLE: if (start || pend) begin
          inv   <= start ? inverse : pend_inv;
          pend  <= 1'b0;
          cnt   <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          if (cnt == (FFT_AW+1)'(FFT_N - 1)) begin
            cnt   <= '0;
            pair  <= 1'b0;
            step  <= '0;
            state <= S_READ;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_READ: begin
          if (cnt != '0) gath[cnt[2:0] - 3'd1] <= half ? cache_rdata : mem_rdata;
          if (cnt == (FFT_AW+1)'(8)) state <= S_ISSUE;
          cnt <= cnt + 1'b1;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (pe_out_valid) begin
          for (int p = 0; p < 8; p++) scat[p] <= '{e: pe_y_exp, im: pe_y_im[p], re: pe_y_re[p]};
          cnt   <= '0;
          state <= S_WRITE;
        end
        S_WRITE: begin
          if (cnt[2:0] == 3'd7) begin
            cnt   <= '0;
            step  <= step + 1'b1;
            state <= S_READ;
            if (step == 9'h1ff) begin
              if (pair) begin
                oinv <= inv;
                if (pend) begin
                  inv   <= pend_inv;
                  pend  <= 1'b0;
                  state <= S_IO;
                end else begin
                  state <= S_UNLOAD;
                end
              end else begin
                pair <= 1'b1;
              end
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: begin
          if (cnt == (FFT_AW+1)'(FFT_N)) begin
            state <= S_IDLE;
          end else begin
            unload_v <= 1'b1;
            last_v   <= (cnt == (FFT_AW+1)'(FFT_N - 1));
            cnt      <= cnt + 1'b1;
          end
        end
        S_IO: if (io_fire) begin
          unload_v <= 1'b1;
          if (cnt == (FFT_AW+1)'(FFT_N - 1)) begin
            last_v <= 1'b1;
            map    <= ~map;
            cnt    <= '0;
            pair   <= 1'b0;
            step   <= '0;
            state  <= S_READ;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign out_valid = unload_v;
  assign out_re    = mem_rdata.re;
  assign out_im    = oinv ? neg_sat(mem_rdata.im) : mem_rdata.im;
  assign out_exp   = mem_rdata.e;

  // The engine answers only the group that was issued.
  a_pe_reply: assert property (@(posedge clk) disable iff (!rst_n)
                               pe_out_valid |-> state == S_WAIT);
  // A sample is taken only while loading.
  a_load_only: assert property (@(posedge clk) disable iff (!rst_n)
                                mem_we && state != S_WRITE |-> state == S_LOAD || state == S_IO);
  // The cache is written only by the first stage of a pair and read only by
  // the second, and main memory and cache are never read together.
  a_cache_dir: assert property (@(posedge clk) disable iff (!rst_n)
                                (cache_we |-> !half) and (cache_re |-> half) and !(cache_re && mem_re));

endmodule

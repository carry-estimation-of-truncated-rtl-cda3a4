// twiddle_rom: N-point FFT twiddle factors W_N^k = cos(2 pi k/N) - j sin(2 pi k/N).
//
// The table is computed at elaboration: each part is rounded to TW-bit two's
// complement with TW-1 fraction bits and clamped to the representable range,
// so +1.0 is stored as 255/256 for TW = 9. NP independent read ports look up
// the table combinationally; k is taken modulo N.
module twiddle_rom #(
  parameter int unsigned N  = 2048,
  parameter int unsigned TW = 9,
  parameter int unsigned NP = 1,
  localparam int unsigned KW = $clog2(N)
) (
  input  logic        [KW-1:0] k  [NP],
  output logic signed [TW-1:0] wr [NP],
  output logic signed [TW-1:0] wi [NP]
);

  typedef logic [2*TW-1:0] table_t [N];

  function automatic logic [TW-1:0] quant(input real v);
    real    s;
    integer q;
    s = v * real'(1 << (TW - 1));
    q = $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
    if (q > (1 << (TW - 1)) - 1) q = (1 << (TW - 1)) - 1;
    if (q < -(1 << (TW - 1)))    q = -(1 << (TW - 1));
    return TW'(q);
  endfunction

  function automatic table_t build();
    table_t t;
    for (int i = 0; i < int'(N); i++) begin
      real ang;
      ang  = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      t[i] = {quant(-$sin(ang)), quant($cos(ang))};
    end
    return t;
  endfunction

  localparam table_t TABLE = build();

  always_comb begin
    for (int p = 0; p < int'(NP); p++) begin
      wr[p] = TABLE[k[p]][TW-1:0];
      wi[p] = TABLE[k[p]][2*TW-1:TW];
    end
  end

endmodule

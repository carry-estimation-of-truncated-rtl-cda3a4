// odsu: overflow detection and scaling unit.
//
// Eight complex IW-bit values enter. The unit finds the smallest right
// shift s (0 .. IW-OW) for which every real and imaginary part, shifted
// arithmetically by s, fits in OW bits, shifts all sixteen parts by that
// same s and reports s, so that a block exponent can be kept elsewhere.
// With en = 0 no scaling is allowed: s = 0 and the parts are saturated to
// OW bits (used where a stage skips this unit).
// Purely combinational.
module odsu #(
  parameter int unsigned IW = 16,
  parameter int unsigned OW = 12,
  localparam int unsigned SW = $clog2(IW - OW + 1)
) (
  input  logic                 en,
  input  logic signed [IW-1:0] x_re  [8],
  input  logic signed [IW-1:0] x_im  [8],
  output logic signed [OW-1:0] y_re  [8],
  output logic signed [OW-1:0] y_im  [8],
  output logic        [SW-1:0] shift
);

  localparam logic signed [IW-1:0] MAXV = IW'((1 << (OW - 1)) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(1 << (OW - 1));

  function automatic logic fits(input logic signed [IW-1:0] v, input int s);
    logic signed [IW-1:0] t;
    t = v >>> s;
    return (t <= MAXV) && (t >= MINV);
  endfunction

  function automatic logic signed [OW-1:0] sat(input logic signed [IW-1:0] v);
    if (v > MAXV) return OW'(MAXV);
    if (v < MINV) return OW'(MINV);
    return OW'(v);
  endfunction

  always_comb begin
    shift = SW'(IW - OW);
    for (int s = int'(IW - OW); s >= 0; s--) begin
      logic ok;
      ok = 1'b1;
      for (int p = 0; p < 8; p++) ok = ok & fits(x_re[p], s) & fits(x_im[p], s);
      if (ok) shift = SW'(s);
    end
    if (!en) shift = '0;
    for (int p = 0; p < 8; p++) begin
      y_re[p] = sat(x_re[p] >>> shift);
      y_im[p] = sat(x_im[p] >>> shift);
    end
  end

endmodule

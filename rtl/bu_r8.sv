// bu_r8: radix-2^3 butterfly unit (8-point DFT) with a radix-2^2 mode.
//
// The 8-point DFT is computed as three radix-2 decimation-in-frequency
// steps. Between the steps the only factors are W8^1 = (1-j)/sqrt2,
// W8^2 = -j and W8^3 = -(1+j)/sqrt2: -j is a swap of real and imaginary
// parts with one negation, and the 1/sqrt2 factors are a constant
// multiplication by 181/256 (0.70703) done with shifts and adds
// (128 + 32 + 16 + 4 + 1). Output position p holds DFT bin rev3(p)
// (bit-reversed order), which is what makes a chain of radix-2^3 and
// radix-2^2 stages end in plain radix-2 bit-reversed order.
// With radix4 = 1 the first step is skipped and inputs 0..3 and 4..7 each
// go through a 4-point DFT; position p of each half holds bin rev2(p).
//
// Widths: IW-bit inputs, OW-bit outputs; OW = IW + 4 covers the growth
// of a complex 8-point sum. Purely combinational.
module bu_r8 #(
  parameter int unsigned IW = 12,
  parameter int unsigned OW = 16
) (
  input  logic signed [IW-1:0] x_re [8],
  input  logic signed [IW-1:0] x_im [8],
  input  logic                 radix4,
  output logic signed [OW-1:0] y_re [8],
  output logic signed [OW-1:0] y_im [8]
);

  localparam int unsigned WW = OW + 1;   // working width

  typedef logic signed [WW-1:0] w_t;

  // v * 181/256 by shift-and-add, truncated
  function automatic w_t mul_c707(input w_t v);
    logic signed [WW+8:0] acc;
    acc = (WW+9)'(v) <<< 7;
    acc = acc + ((WW+9)'(v) <<< 5);
    acc = acc + ((WW+9)'(v) <<< 4);
    acc = acc + ((WW+9)'(v) <<< 2);
    acc = acc + (WW+9)'(v);
    return WW'(acc >>> 8);
  endfunction

  w_t a_re [8], a_im [8];   // after step 1
  w_t b_re [8], b_im [8];   // after step 2
  w_t c_re [8], c_im [8];   // after step 3

  always_comb begin
    // step 1: pairs (m, m+4), difference rotated by W8^m
    for (int m = 0; m < 4; m++) begin
      w_t tr, ti;
      tr = WW'(x_re[m]) - WW'(x_re[m+4]);
      ti = WW'(x_im[m]) - WW'(x_im[m+4]);
      if (radix4) begin
        a_re[m]   = WW'(x_re[m]);   a_im[m]   = WW'(x_im[m]);
        a_re[m+4] = WW'(x_re[m+4]); a_im[m+4] = WW'(x_im[m+4]);
      end else begin
        a_re[m] = WW'(x_re[m]) + WW'(x_re[m+4]);
        a_im[m] = WW'(x_im[m]) + WW'(x_im[m+4]);
        case (m)
          0:       begin a_re[4] = tr;                 a_im[4] = ti;                  end
          1:       begin a_re[5] = mul_c707(tr + ti);  a_im[5] = mul_c707(ti - tr);   end
          2:       begin a_re[6] = ti;                 a_im[6] = -tr;                 end
          default: begin a_re[7] = mul_c707(ti - tr);  a_im[7] = -mul_c707(tr + ti);  end
        endcase
      end
    end
    // step 2: in each half, pairs (m, m+2), difference rotated by W4^m
    for (int h = 0; h < 8; h += 4) begin
      for (int m = 0; m < 2; m++) begin
        w_t tr, ti;
        tr = a_re[h+m] - a_re[h+m+2];
        ti = a_im[h+m] - a_im[h+m+2];
        b_re[h+m] = a_re[h+m] + a_re[h+m+2];
        b_im[h+m] = a_im[h+m] + a_im[h+m+2];
        if (m == 0) begin b_re[h+2] = tr; b_im[h+2] = ti;  end
        else        begin b_re[h+3] = ti; b_im[h+3] = -tr; end
      end
    end
    // step 3: adjacent pairs
    for (int q = 0; q < 8; q += 2) begin
      c_re[q]   = b_re[q] + b_re[q+1];
      c_im[q]   = b_im[q] + b_im[q+1];
      c_re[q+1] = b_re[q] - b_re[q+1];
      c_im[q+1] = b_im[q] - b_im[q+1];
    end
    for (int p = 0; p < 8; p++) begin
      y_re[p] = OW'(c_re[p]);
      y_im[p] = OW'(c_im[p]);
    end
  end

endmodule

// booth_trunc_mult: fixed-width signed radix-4 Booth multiplier with carry
// estimation.
//
// The full product of an AW-bit multiplicand a and a BW-bit multiplier b
// has AW+BW bits. This multiplier never builds the TRUNC least significant
// columns of the partial-product array: only the upper AW+BW-TRUNC bits are
// produced, and the carry that the dropped columns would have sent upward is
// replaced by an estimate chosen with METHOD.
//
// Booth encoding (radix 4): b is cut into ceil(BW/2) overlapping triples
// {b[2i+1], b[2i], b[2i-1]} with b[-1] = 0. Each triple selects a digit
// y_i in {-2,-1,0,1,2}. Row i is an (AW+1)-bit pattern: a or 2a, inverted
// when the digit is negative, plus a 1 (n_i) at column 2i to complete the
// two's complement. Digit 0 from triple 111 has n_i = 0.
//
// beta is the number of ones in column TRUNC-1, the most significant
// dropped column. The carry added at column TRUNC is
//   COMP_NONE : 0
//   COMP_TYPE1: [beta/2 + (1/4)*sum(y''_i)]  over rows 0..ceil(BW/2)-2,
//               y''_i = 1 when digit i is nonzero, halves rounded up
//   COMP_TYPE2: [beta/2 + beta/10 + (3/20)*ceil(BW/2)], halves rounded up
//   COMP_TYPE3: [beta/2 + lambda3], lambda3 = 3/8 of every bit in the
//               columns below TRUNC-1, each at its weight; halves rounded up
// For the 12x9 FFT multiplier with TRUNC = 6, lambda3 = 9/16 and the Type III
// carry is floor(beta/2) + 1. The estimates follow the statistical analysis
// they are named after; leaving the last row out of the Type I sum and the use of the
// bit count of each dropped column for lambda3 are choices that reproduce
// the published error figures.
//
// Interface: purely combinational; p is (a*b) / 2^TRUNC approximated, as a
// two's-complement value of AW+BW-TRUNC bits.
module booth_trunc_mult
  import trunc_pkg::*;
#(
  parameter int unsigned  AW     = 12,
  parameter int unsigned  BW     = 9,
  parameter int unsigned  TRUNC  = 6,
  parameter comp_method_e METHOD = COMP_TYPE3
) (
  input  logic signed [AW-1:0]          a,
  input  logic signed [BW-1:0]          b,
  output logic signed [AW+BW-TRUNC-1:0] p
);

  localparam int unsigned NR = (BW + 1) / 2;     // Booth rows
  localparam int unsigned PW = AW + BW + 2;      // accumulation width
  localparam int unsigned OW = AW + BW - TRUNC;  // output width

  // Number of partial-product bits (pattern bits and n_i) in column c.
  function automatic int col_count(input int c);
    int cnt = 0;
    for (int i = 0; i < int'(NR); i++) begin
      if (c >= 2*i && c <= 2*i + int'(AW)) cnt++;
      if (c == 2*i) cnt++;
    end
    return cnt;
  endfunction

  // 3 * sum(cnt(c) * 2^c) over c < TRUNC-1: lambda3 scaled by 2^(TRUNC+3).
  function automatic longint lambda3_q();
    longint s = 0;
    for (int c = 0; c < int'(TRUNC) - 1; c++) s += 3 * longint'(col_count(c)) << c;
    return s;
  endfunction

  localparam longint LAM3_Q = lambda3_q();

  logic [2*NR:0]           bx;          // {sign-extended b, b[-1]=0}
  logic [NR-1:0]           d_one, d_two, d_neg;
  logic [AW:0]             row   [NR];  // row patterns before the +n_i
  logic signed [PW-1:0]    kept;        // sum of the kept columns
  logic [7:0]              beta;
  logic [7:0]              ynz;
  logic signed [PW-1:0]    carry;

  assign bx = {{(2*NR-BW){b[BW-1]}}, b, 1'b0};

  always_comb begin
    kept = '0;
    beta = '0;
    ynz  = '0;
    for (int i = 0; i < int'(NR); i++) begin
      logic [2:0] t;
      logic [AW:0] sel;
      logic signed [PW-1:0] rw;
      t        = bx[2*i +: 3];            // {b[2i+1], b[2i], b[2i-1]}
      d_one[i] = t[1] ^ t[0];
      d_two[i] = (t == 3'b011) || (t == 3'b100);
      d_neg[i] = t[2] & ~(t[1] & t[0]);
      sel      = d_one[i] ? {a[AW-1], a} : d_two[i] ? {a, 1'b0} : '0;
      row[i]   = d_neg[i] ? ~sel : sel;
      // The row, sign extended and placed at column 2i; dropping the columns
      // below TRUNC is an arithmetic shift of that value.
      rw       = PW'($signed(row[i])) <<< (2*i);
      kept     = kept + (rw >>> TRUNC);
      if (2*i >= int'(TRUNC)) kept = kept + (PW'(d_neg[i]) << (2*i - int'(TRUNC)));
      // beta: the ones of column TRUNC-1
      if (int'(TRUNC) - 1 - 2*i >= 0 && int'(TRUNC) - 1 - 2*i <= int'(AW))
        beta = beta + 8'(row[i][int'(TRUNC) - 1 - 2*i]);
      if (2*i == int'(TRUNC) - 1) beta = beta + 8'(d_neg[i]);
      if (i < int'(NR) - 1) ynz = ynz + 8'(d_one[i] | d_two[i]);
    end
  end

  always_comb begin
    unique case (METHOD)
      COMP_TYPE1: carry = PW'((2*longint'(beta) + longint'(ynz) + 2) / 4);
      COMP_TYPE2: carry = PW'((12*longint'(beta) + 3*longint'(NR) + 10) / 20);
      COMP_TYPE3: carry = PW'(((longint'(beta) << (TRUNC + 2)) + LAM3_Q
                               + (longint'(1) << (TRUNC + 2))) >>> (TRUNC + 3));
      default:    carry = '0;
    endcase
  end

  assign p = OW'(kept + carry);

endmodule

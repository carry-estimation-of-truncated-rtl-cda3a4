// bw_trunc_mult: fixed-width signed N x N Baugh-Wooley multiplier with carry
// estimation.
//
// The modified Baugh-Wooley array forms the partial products
// P(i,j) = a_j & b_i at column i+j, inverts those that use exactly one sign
// bit (a_{N-1} or b_{N-1}), and adds constant ones at columns N and 2N-1.
// Only the N most significant columns are summed; the lower N columns are
// dropped and their carry into column N is replaced by an estimate:
//   beta     = number of ones in column N-1 (the bits alpha_j = P(N-1-j, j))
//   COMP_NONE : 0 (direct truncation)
//   COMP_TYPE1: [beta/2 + (1/4) * sum_{j<N-1} a_j], halves rounded down
//   COMP_TYPE2: [beta/2 + (beta - alpha_{N-1})/6 + (N-1)/12], halves up
//   COMP_TYPE3: floor((beta + 1 + E)/2), where E estimates 2*lambda - 1 from
//               d = beta - P(N-1,0) with the per-width rule
//                 N=8 : floor((d+1)/2)
//                 N=10: 0 if d = 0, else floor((d+2)/2)
//                 N=12: floor((d+2)/2)        N=14,16: floor((d+3)/2)
//               (other widths use the N=12 rule)
// The estimates follow a statistical analysis of the dropped columns under
// uniformly distributed inputs. The rounding direction of Type I and the way
// Type III combines the table entry with beta are this design's reading of
// the analysis.
//
// Interface: purely combinational. p approximates (a*b) / 2^N as an N-bit
// two's-complement value.
module bw_trunc_mult
  import trunc_pkg::*;
#(
  parameter int unsigned  N      = 8,
  parameter comp_method_e METHOD = COMP_TYPE3
) (
  input  logic signed [N-1:0] a,
  input  logic signed [N-1:0] b,
  output logic signed [N-1:0] p
);

  logic [2*N-1:0] kept;      // sum of the kept columns, modulo 2^(2N)
  logic [7:0]     beta;      // ones in column N-1
  logic [7:0]     asum;      // sum of a_0 .. a_{N-2}
  logic           alpha_lo;  // alpha_{N-1} = P(0, N-1)
  logic           beta_hi;   // beta_{N-1}  = P(N-1, 0)
  logic [7:0]     carry;

  always_comb begin
    kept = (2*N)'(1) << N;
    kept = kept + ((2*N)'(1) << (2*N - 1));
    beta = '0;
    asum = '0;
    alpha_lo = 1'b0;
    beta_hi  = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      for (int j = 0; j < int'(N); j++) begin
        logic pp;
        pp = a[j] & b[i];
        if ((i == int'(N) - 1) != (j == int'(N) - 1)) pp = ~pp;
        if (i + j >= int'(N)) kept = kept + ((2*N)'(pp) << (i + j));
        if (i + j == int'(N) - 1) begin
          beta = beta + 8'(pp);
          if (i == 0)           alpha_lo = pp;
          if (i == int'(N) - 1) beta_hi  = pp;
        end
      end
    end
    for (int j = 0; j < int'(N) - 1; j++) asum = asum + 8'(a[j]);
  end

  // Type III: estimate of 2*lambda - 1 from d = beta - beta_{N-1}
  function automatic int est_2lam_m1(input int d);
    case (N)
      8:       return (d + 1) / 2;
      10:      return (d == 0) ? 0 : (d + 2) / 2;
      14, 16:  return (d + 3) / 2;
      default: return (d + 2) / 2;
    endcase
  endfunction

  always_comb begin
    int d;
    d = int'(beta) - int'(beta_hi);
    unique case (METHOD)
      COMP_TYPE1: carry = 8'((2*int'(beta) + int'(asum) + 1) / 4);
      COMP_TYPE2: carry = 8'((8*int'(beta) - 2*int'(alpha_lo) + int'(N) - 1 + 6) / 12);
      COMP_TYPE3: carry = 8'((int'(beta) + 1 + est_2lam_m1(d)) / 2);
      default:    carry = '0;
    endcase
  end

  assign p = kept[2*N-1:N] + N'(carry);

endmodule

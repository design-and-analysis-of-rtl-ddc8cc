// Positive approximate 4-2 compressor (PC).
//
// A carry-free replacement for the exact 4-2 compressor: no carry-in, no
// carry-out. With x = {d, c, b, a}:
//   sum   = a | b | c | d                (weight 2^i)
//   carry = ab | bc | bd | cd            (weight 2^(i+1))
// The low output is 1 for every non-zero input, which only ever raises the
// result; the carry term was chosen for low cost, and on the whole it leaves
// the error positive (a multiplier built from it over-estimates on average).
// All-zero inputs give an exact 0. Combinational.
// Both output equations are the published ones.
module pos_compressor (
  input  logic [3:0] x,      // a_i, b_i, c_i, d_i
  output logic       sum,    // approximate y_i
  output logic       carry   // approximate y_(i+1)
);

  or4_gate u_or (.x(x), .y(sum));

  assign carry = (x[0] & x[1]) | (x[1] & x[2]) | (x[1] & x[3]) | (x[2] & x[3]);

endmodule

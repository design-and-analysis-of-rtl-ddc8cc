// Negative approximate 4-2 compressor (NC).
//
// Carry-free like the PC, with the same low output but a sparser carry.
// With x = {d, c, b, a}:
//   sum   = a | b | c | d                (weight 2^i)
//   carry = ab | cd                      (weight 2^(i+1))
// Dropping the mixed pairs from the carry loses weight-2 terms often enough
// to outweigh the OR's over-estimate, so a multiplier built from it
// under-estimates on average. All-zero inputs give an exact 0.
// Combinational.
// Both output equations are the published ones.
module neg_compressor (
  input  logic [3:0] x,      // a_i, b_i, c_i, d_i
  output logic       sum,    // approximate y_i
  output logic       carry   // approximate y_(i+1)
);

  or4_gate u_or (.x(x), .y(sum));

  assign carry = (x[0] & x[1]) | (x[2] & x[3]);

endmodule

// Exact 4-2 compressor.
//
// Four bits x[0..3] = a_i, b_i, c_i, d_i of column i plus the carry-in z_i from
// the compressor of column i-1 are reduced to a sum y_i (weight 2^i) and two
// bits of weight 2^(i+1): the carry y_(i+1) and the carry-out z_(i+1). It is
// the usual two-full-adder cell written in multiplexer form:
//   t       = a ^ b ^ c ^ d
//   y_i     = t ^ z_i
//   y_(i+1) = t ? z_i : d
//   z_(i+1) = (a ^ b) ? c : a
// so that a + b + c + d + z_i = y_i + 2 (y_(i+1) + z_(i+1)). z_(i+1) does not
// depend on z_i, so a row of these cells has no rippling carry.
// Combinational.
// The equations are the published exact compressor's.
module exact_compressor (
  input  logic [3:0] x,      // a_i, b_i, c_i, d_i
  input  logic       cin,    // z_i
  output logic       sum,    // y_i
  output logic       carry,  // y_(i+1)
  output logic       cout    // z_(i+1)
);

  logic ab, t;

  assign ab    = x[0] ^ x[1];
  assign t     = ab ^ x[2] ^ x[3];
  assign sum   = t ^ cin;
  assign carry = t ? cin : x[3];
  assign cout  = ab ? x[2] : x[0];

endmodule

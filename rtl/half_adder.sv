// Exact half adder: adds two bits of equal weight into a sum bit of the same
// weight and a carry bit of the next weight. Used where the compressor tree
// has exactly two bits to combine. Combinational.
// The published layout uses exact half adders; the gate form is the
// standard one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule

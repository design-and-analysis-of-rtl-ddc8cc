// Exact full adder (3:2 counter): three bits of equal weight become a sum bit
// of the same weight and a carry bit (majority) of the next weight.
// Combinational.
// The published layout uses exact full adders; the gate form is the
// standard one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);

endmodule

// Four-input OR gate: the low output of both proposed approximate 4-2
// compressors. It is 1 unless all four input bits are 0, so an approximate
// compressor fed with zeros still gives an exact zero. Combinational.
// It is the shared OR term of the published compressor equations.
module or4_gate (
  input  logic [3:0] x,
  output logic       y
);

  assign y = |x;

endmodule

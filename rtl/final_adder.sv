// Carry-propagate adder for the last step of the multiplier: the compressor
// tree leaves at most two bits per column, read as two WIDTH-bit rows, and
// this adder adds them into a WIDTH+1-bit result. It is written as a plain
// ripple of exact full adders; any carry-propagate structure would do.
// Combinational.
// The published design asks only for a carry-propagate adder; the ripple
// form is this implementation's choice.
module final_adder #(
  parameter int unsigned WIDTH = 15
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH:0]   s
);

  logic [WIDTH:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .c(c[i]), .sum(s[i]), .carry(c[i+1]));
  end

  assign s[WIDTH] = c[WIDTH];

endmodule

// Test of the 15-bit carry-propagate adder: corner cases (zero, all ones,
// a carry rippling through every bit) and 20000 random pairs against x + y.
module tb_final_adder;
  localparam int unsigned WIDTH = 15;
  logic [WIDTH-1:0] x, y;
  logic [WIDTH:0]   s;
  int checks = 0, failures = 0;

  final_adder #(.WIDTH(WIDTH)) dut (.x(x), .y(y), .s(s));

  task automatic check(input logic [WIDTH-1:0] vx, input logic [WIDTH-1:0] vy);
    x = vx; y = vy;
    #1;
    checks++;
    if (s !== {1'b0, vx} + {1'b0, vy}) begin
      failures++;
      $display("FAIL %0d + %0d = %0d", vx, vy, s);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 1);
    check(15'h5555, 15'h2aaa);
    for (int i = 0; i < 20000; i++) check(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

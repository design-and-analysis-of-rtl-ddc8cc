// Exhaustive test of the four-input OR: 0 only for the all-zero input.
module tb_or4_gate;
  logic [3:0] x;
  logic       y;
  int checks = 0, failures = 0;

  or4_gate dut (.x(x), .y(y));

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      checks++;
      if (y !== (v != 0)) begin
        failures++;
        $display("FAIL x=%b y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Exhaustive test of the exact 4-2 compressor over all 32 input patterns:
// the outputs must carry the full weight, sum + 2*(carry + cout) equal to
// a + b + c + d + cin, and the carry-out must not depend on the carry-in.
module tb_exact_compressor;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  logic       cout_at_cin0;
  int checks = 0, failures = 0;

  exact_compressor dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        x = 4'(v); cin = 1'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d", x, cin, sum, carry, cout);
        end
        if (ci == 0) cout_at_cin0 = cout;
        else begin
          checks++;
          if (cout !== cout_at_cin0) begin
            failures++;
            $display("FAIL x=%b: cout depends on cin", x);
          end
        end
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

// Exhaustive test of the neg approximate 4-2 compressor against its
// defining equations (x = {d, c, b, a}): sum = a|b|c|d and
// carry = (x[0] & x[1]) | (x[2] & x[3]).
// It also checks that the all-zero input gives exactly 0 and that the signed
// error (sum + 2*carry - popcount) summed over the 16 patterns is -3.
module tb_neg_compressor;
  logic [3:0] x;
  logic       sum, carry;
  logic       exp_carry;
  int checks = 0, failures = 0;
  int err_total = 0;

  neg_compressor dut (.x(x), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      exp_carry = (x[0] & x[1]) | (x[2] & x[3]);
      checks++;
      if (sum !== (v != 0) || carry !== exp_carry) begin
        failures++;
        $display("FAIL x=%b sum=%0d carry=%0d expected %0d %0d", x, sum, carry, v != 0, exp_carry);
      end
      err_total += int'(sum) + 2 * int'(carry) - $countones(x);
    end
    checks++;
    if (err_total != -3) begin
      failures++;
      $display("FAIL total error %0d, expected -3", err_total);
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

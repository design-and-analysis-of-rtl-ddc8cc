// Exhaustive test of the partial-product generator over all 65536 operand
// pairs: every pp[n][m] must equal a[m] & b[n], and the weighted sum of all
// partial products must equal a * b.
module tb_pp_gen;
  logic [7:0]      a, b;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        int unsigned total;
        bit          bit_ok;
        a = 8'(va); b = 8'(vb);
        #1;
        total  = 0;
        bit_ok = 1'b1;
        for (int n = 0; n < 8; n++)
          for (int m = 0; m < 8; m++) begin
            total += int'(pp[n][m]) << (m + n);
            if (pp[n][m] !== (a[m] & b[n])) bit_ok = 1'b0;
          end
        checks++;
        if (!bit_ok || total != va * vb) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d weighted sum %0d", va, vb, total);
        end
      end
    end
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

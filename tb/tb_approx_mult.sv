// Exhaustive test of the approximate multiplier in four configurations:
// positive and negative flavour, each with W = 8 (compressors of columns
// 0-7 approximate) and W = 16 (all compressors approximate).
//
// For all 65536 operand pairs each output is compared with the bit-level
// reference model, and operands that are zero or a power of two must give
// the exact product. The summed error of each configuration over all pairs
// must equal the independently derived total, which also fixes its sign:
// the positive flavour errs upwards and the negative one downwards.
module tb_approx_mult;
  import mac_pkg::*;
  import approx_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p_pm8, p_nm8, p_pm16, p_nm16;
  int checks = 0, failures = 0;
  longint err_pm8 = 0, err_nm8 = 0, err_pm16 = 0, err_nm16 = 0;
  int exact_cases = 0;

  approx_mult #(.W(8),  .KIND(MUL_PM)) u_pm8  (.a(a), .b(b), .p(p_pm8));
  approx_mult #(.W(8),  .KIND(MUL_NM)) u_nm8  (.a(a), .b(b), .p(p_nm8));
  approx_mult                          u_pm16 (.a(a), .b(b), .p(p_pm16));
  approx_mult #(.W(16), .KIND(MUL_NM)) u_nm16 (.a(a), .b(b), .p(p_nm16));

  task automatic cmp(input string name, input logic [15:0] got, input int unsigned want);
    checks++;
    if (32'(got) != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d got %0d want %0d", name, a, b, got, want);
    end
  endtask

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        int exact;
        a = 8'(va); b = 8'(vb);
        #1;
        exact = va * vb;
        cmp("PM W=8",  p_pm8,  ref_mult(va, vb, 8, 1'b0));
        cmp("NM W=8",  p_nm8,  ref_mult(va, vb, 8, 1'b1));
        cmp("PM W=16", p_pm16, ref_mult(va, vb, 16, 1'b0));
        cmp("NM W=16", p_nm16, ref_mult(va, vb, 16, 1'b1));
        if ($countones(a) <= 1 || $countones(b) <= 1) begin
          exact_cases++;
          cmp("PM W=8 exact",  p_pm8,  exact);
          cmp("NM W=8 exact",  p_nm8,  exact);
          cmp("PM W=16 exact", p_pm16, exact);
          cmp("NM W=16 exact", p_nm16, exact);
        end
        err_pm8  += longint'(p_pm8)  - exact;
        err_nm8  += longint'(p_nm8)  - exact;
        err_pm16 += longint'(p_pm16) - exact;
        err_nm16 += longint'(p_nm16) - exact;
      end
    end
    checks += 4;
    if (err_pm8  != ERR_SUM_PM_W8)  begin failures++; $display("FAIL PM W=8 error sum %0d", err_pm8); end
    if (err_nm8  != ERR_SUM_NM_W8)  begin failures++; $display("FAIL NM W=8 error sum %0d", err_nm8); end
    if (err_pm16 != ERR_SUM_PM_W16) begin failures++; $display("FAIL PM W=16 error sum %0d", err_pm16); end
    if (err_nm16 != ERR_SUM_NM_W16) begin failures++; $display("FAIL NM W=16 error sum %0d", err_nm16); end
    $display("mean error  PM W=8 %0.3f  NM W=8 %0.3f  PM W=16 %0.3f  NM W=16 %0.3f",
             real'(err_pm8) / 65536.0, real'(err_nm8) / 65536.0,
             real'(err_pm16) / 65536.0, real'(err_nm16) / 65536.0);
    $display("exact-by-construction cases checked: %0d", exact_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Channel-width sweep of the error-balanced MAC (default parameters).
//
// 3x3 windows are accumulated over C = 8, 32, 128 and 512 channels with
// uniformly random 8-bit operands, 200 windows per width. Every result is
// compared with the bit-level reference model. For each width the test
// forms the normalised mean error distance, NMED = mean |error| divided by
// the largest possible dot product C*9*255*255, for the blended unit and,
// from the reference model, for the same lanes all positive or all
// negative. One-directional errors grow in step with the dot product, so
// their NMED stays nearly flat as C grows; the blended errors largely
// cancel, so its NMED must fall with C. The test requires the blended NMED
// at C = 512 to be below half its value at C = 8, the all-negative NMED to
// change by less than a factor of 1.5 across the sweep, and the blended NMED
// to stay below the all-negative one at every width.
module tb_conv_channels;
  import mac_pkg::*;
  import approx_ref_pkg::*;

  localparam int unsigned NPE       = 7;
  localparam int unsigned NUM_PM    = 2;
  localparam int unsigned NUM_NM    = 5;
  localparam int unsigned W         = 16;
  localparam int unsigned N_WINDOWS = 200;
  localparam int unsigned N_WIDTHS  = 4;
  localparam int unsigned WIDTHS [N_WIDTHS] = '{8, 32, 128, 512};

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid, in_first, in_last;
  logic [NPE-1:0][7:0] in_a, in_b;
  logic                out_valid;
  logic [31:0]         out_acc;

  int  checks = 0, failures = 0;
  real nmed_blend [N_WIDTHS];
  real nmed_nm    [N_WIDTHS];
  real nmed_pm    [N_WIDTHS];

  approx_mac dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .in_a(in_a), .in_b(in_b),
    .out_valid(out_valid), .out_acc(out_acc)
  );

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_a = '0; in_b = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int wi = 0; wi < N_WIDTHS; wi++) begin
      int unsigned terms, beats;
      real sum_b, sum_p, sum_n, max_dot;
      terms = WIDTHS[wi] * 9;
      beats = (terms + NPE - 1) / NPE;
      sum_b = 0.0; sum_p = 0.0; sum_n = 0.0;
      for (int win = 0; win < N_WINDOWS; win++) begin
        longint exp_acc, exact, all_pm, all_nm;
        exp_acc = 0; exact = 0; all_pm = 0; all_nm = 0;
        for (int beat = 0; beat < beats; beat++) begin
          logic [NPE-1:0][7:0] va, vb;
          for (int k = 0; k < NPE; k++) begin
            if (beat * NPE + k < terms) begin
              va[k] = 8'($urandom); vb[k] = 8'($urandom);
            end else begin
              va[k] = '0; vb[k] = '0;
            end
            exp_acc += ref_mult(va[k], vb[k], W, lane_kind(k, NUM_PM, NUM_NM) == MUL_NM);
            all_pm  += ref_mult(va[k], vb[k], W, 1'b0);
            all_nm  += ref_mult(va[k], vb[k], W, 1'b1);
            exact   += int'(va[k]) * int'(vb[k]);
          end
          in_valid <= 1'b1;
          in_first <= (beat == 0);
          in_last  <= (beat == beats - 1);
          in_a <= va; in_b <= vb;
          @(posedge clk);
        end
        in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
        #1;
        checks++;
        if (out_valid !== 1'b1 || longint'(out_acc) != exp_acc) begin
          failures++;
          if (failures < 10)
            $display("FAIL C=%0d window %0d: acc=%0d expected %0d", WIDTHS[wi], win, out_acc, exp_acc);
        end
        sum_b += (exp_acc > exact) ? real'(exp_acc - exact) : real'(exact - exp_acc);
        sum_p += (all_pm > exact) ? real'(all_pm - exact) : real'(exact - all_pm);
        sum_n += (all_nm > exact) ? real'(all_nm - exact) : real'(exact - all_nm);
        @(posedge clk);
      end
      max_dot = real'(terms) * 255.0 * 255.0;
      nmed_blend[wi] = sum_b / N_WINDOWS / max_dot;
      nmed_pm[wi]    = sum_p / N_WINDOWS / max_dot;
      nmed_nm[wi]    = sum_n / N_WINDOWS / max_dot;
      $display("C=%0d  NMED blend %0.6f  all-PM %0.6f  all-NM %0.6f",
               WIDTHS[wi], nmed_blend[wi], nmed_pm[wi], nmed_nm[wi]);
      checks++;
      if (!(nmed_blend[wi] < nmed_nm[wi])) begin
        failures++;
        $display("FAIL C=%0d: blended NMED not below all-negative NMED", WIDTHS[wi]);
      end
    end

    checks += 2;
    if (!(nmed_blend[N_WIDTHS-1] * 2.0 < nmed_blend[0])) begin
      failures++;
      $display("FAIL blended NMED does not fall with the channel width");
    end
    if (!(nmed_nm[0] < 1.5 * nmed_nm[N_WIDTHS-1] && nmed_nm[N_WIDTHS-1] < 1.5 * nmed_nm[0])) begin
      failures++;
      $display("FAIL all-negative NMED is not flat across the channel widths");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_WINDOWS * 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end test of the error-balanced MAC at its default parameters
// (7 lanes, 2 positive : 5 negative multipliers, W = 16, 32-bit accumulator).
//
// Workload: 3x3 convolution windows over C = 64 channels with uniformly
// random 8-bit kernel and input values, 576 products per window, fed as 83
// beats of 7 lanes; the last beat carries 2 products and 5 zero-padded lanes.
// Random idle cycles are inserted between beats and some windows follow each
// other back to back. Every result is compared with the bit-level reference
// model, lane by lane with the lane's flavour, and the one-cycle latency and
// one-cycle out_valid pulse are checked.
//
// Error balance: for every window the test also forms, from the reference
// model, the result the same lanes would give if all were positive or all
// negative. The blended unit's mean absolute error must be below a quarter of the
// all-negative one and a tenth of the all-positive one,
// and its NMED (mean |error| / largest possible dot product) is printed.
module tb_approx_mac;
  import mac_pkg::*;
  import approx_ref_pkg::*;

  localparam int unsigned NPE      = 7;
  localparam int unsigned NUM_PM   = 2;
  localparam int unsigned NUM_NM   = 5;
  localparam int unsigned W        = 16;
  localparam int unsigned C        = 64;
  localparam int unsigned FW       = 3;
  localparam int unsigned FH       = 3;
  localparam int unsigned TERMS    = C * FW * FH;               // 576
  localparam int unsigned BEATS    = (TERMS + NPE - 1) / NPE;   // 83
  localparam int unsigned N_WINDOWS = 2000;

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     in_valid, in_first, in_last;
  logic [NPE-1:0][7:0]      in_a, in_b;
  logic                     out_valid;
  logic [31:0]              out_acc;

  int checks = 0, failures = 0;
  int n_pm_lane_terms = 0, n_nm_lane_terms = 0, n_padded = 0, n_idle = 0;
  int n_first = 0, n_last = 0, n_back_to_back = 0, n_results = 0;
  longint cycle = 0;

  real sum_abs_blend = 0.0, sum_abs_pm = 0.0, sum_abs_nm = 0.0;
  real sum_blend = 0.0;

  approx_mac dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .in_a(in_a), .in_b(in_b),
    .out_valid(out_valid), .out_acc(out_acc)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // out_valid must be a single-cycle pulse following each last beat.
  logic last_d;
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid !== last_d) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%0d, last beat one cycle ago=%0d", cycle, out_valid, last_d);
      end
    end
  end
  always @(posedge clk) last_d <= rst_n && in_valid && in_last;

  task automatic idle_cycle();
    in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
    in_a <= '0; in_b <= '0;
    @(posedge clk);
    n_idle++;
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_a = '0; in_b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (out_acc !== '0 || out_valid !== 1'b0) begin
      failures++;
      $display("FAIL accumulator not cleared by reset");
    end

    for (int win = 0; win < N_WINDOWS; win++) begin
      longint exp_acc, exact, all_pm, all_nm;
      bit back_to_back;
      exp_acc = 0; exact = 0; all_pm = 0; all_nm = 0;
      back_to_back = (win % 3 == 1);
      if (!back_to_back) repeat (1 + $urandom_range(0, 2)) idle_cycle();
      else n_back_to_back++;

      for (int beat = 0; beat < BEATS; beat++) begin
        logic [NPE-1:0][7:0] va, vb;
        for (int k = 0; k < NPE; k++) begin
          int t;
          t = beat * NPE + k;
          if (t < TERMS) begin
            va[k] = 8'($urandom);
            vb[k] = 8'($urandom);
            if (lane_kind(k, NUM_PM, NUM_NM) == MUL_PM) n_pm_lane_terms++;
            else n_nm_lane_terms++;
          end else begin
            va[k] = '0; vb[k] = '0;
            n_padded++;
          end
          exp_acc += ref_mult(va[k], vb[k], W, lane_kind(k, NUM_PM, NUM_NM) == MUL_NM);
          all_pm  += ref_mult(va[k], vb[k], W, 1'b0);
          all_nm  += ref_mult(va[k], vb[k], W, 1'b1);
          exact   += int'(va[k]) * int'(vb[k]);
        end
        in_valid <= 1'b1;
        in_first <= (beat == 0);
        in_last  <= (beat == BEATS - 1);
        in_a <= va; in_b <= vb;
        if (beat == 0) n_first++;
        if (beat == BEATS - 1) n_last++;
        @(posedge clk);
        // an idle cycle inside the window must not disturb the sum
        if (beat == BEATS / 2 && !back_to_back) idle_cycle();
      end
      in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
      if (back_to_back && win + 1 < N_WINDOWS) begin
        // next window starts immediately; sample the result on its first beat
      end
      #1;
      checks++;
      n_results += out_valid;
      if (out_valid !== 1'b1 || longint'(out_acc) != exp_acc) begin
        failures++;
        $display("FAIL window %0d: out_valid=%0d acc=%0d expected %0d", win, out_valid, out_acc, exp_acc);
      end
      sum_blend     += real'(exp_acc - exact);
      sum_abs_blend += (exp_acc > exact) ? real'(exp_acc - exact) : real'(exact - exp_acc);
      sum_abs_pm    += (all_pm > exact) ? real'(all_pm - exact) : real'(exact - all_pm);
      sum_abs_nm    += (all_nm > exact) ? real'(all_nm - exact) : real'(exact - all_nm);
      if (!back_to_back) begin
        // the result must hold through idle cycles
        idle_cycle();
        #1;
        checks++;
        if (longint'(out_acc) != exp_acc || out_valid !== 1'b0) begin
          failures++;
          $display("FAIL window %0d: result not held while idle", win);
        end
      end
    end

    begin
      real max_dot, m_blend, m_pm, m_nm;
      max_dot = real'(TERMS) * 255.0 * 255.0;
      m_blend = sum_abs_blend / N_WINDOWS;
      m_pm    = sum_abs_pm / N_WINDOWS;
      m_nm    = sum_abs_nm / N_WINDOWS;
      $display("windows %0d  mean error (blend) %0.1f", N_WINDOWS, sum_blend / N_WINDOWS);
      $display("mean |error|: blend %0.1f  all-PM %0.1f  all-NM %0.1f", m_blend, m_pm, m_nm);
      $display("NMED: blend %0.6f  all-PM %0.6f  all-NM %0.6f", m_blend / max_dot, m_pm / max_dot, m_nm / max_dot);
      checks += 2;
      if (!(m_blend * 4.0 < m_nm)) begin
        failures++; $display("FAIL blend error not well below all-NM error");
      end
      if (!(m_blend * 10.0 < m_pm)) begin
        failures++; $display("FAIL blend error not well below all-PM error");
      end
    end

    $display("mechanisms: first=%0d last=%0d results=%0d back_to_back=%0d idle=%0d PM-lane terms=%0d NM-lane terms=%0d padded lanes=%0d",
             n_first, n_last, n_results, n_back_to_back, n_idle, n_pm_lane_terms, n_nm_lane_terms, n_padded);
    checks += 6;
    if (n_first == 0 || n_last == 0)   begin failures++; $display("FAIL framing never exercised"); end
    if (n_back_to_back == 0)           begin failures++; $display("FAIL no back-to-back windows"); end
    if (n_idle == 0)                   begin failures++; $display("FAIL no idle cycles"); end
    if (n_pm_lane_terms == 0)          begin failures++; $display("FAIL no positive-lane products"); end
    if (n_nm_lane_terms == 0)          begin failures++; $display("FAIL no negative-lane products"); end
    if (n_padded == 0)                 begin failures++; $display("FAIL no zero-padded lanes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_WINDOWS * (BEATS + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

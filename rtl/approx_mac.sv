// Error-balanced approximate multiply-accumulate unit (top level).
//
// Approximate multipliers that always err in one direction make a long dot
// product drift further with every term. This unit instead runs NPE parallel
// lanes, each holding one approximate 8x8 multiplier whose flavour is fixed
// at elaboration: positive (PM, over-estimates on average) or negative (NM,
// under-estimates on average). Lanes are assigned in the ratio
// NUM_PM : NUM_NM, spread evenly (see mac_pkg::lane_kind), so that the
// expected errors of the lanes cancel in the sum. With every compressor
// approximate (W = 16) the mean product error is about +909.7 for a PM and
// -362.7 for an NM over uniformly random operands, so two PMs per five NMs
// balance to within +5.8 per seven products; that 2:5 blend over seven lanes
// is the default. The lane products are added exactly and accumulated
// exactly; only the multipliers approximate.
//
// Interface and timing: a beat is one cycle with in_valid high and carries
// NPE operand pairs in_a[k], in_b[k]. in_first marks the first beat of a dot
// product (the accumulator restarts from that beat's sum), in_last the last.
// One cycle after the last beat, out_valid pulses for one cycle and out_acc
// holds the result; out_acc keeps its value until the next valid beat.
// Cycles with in_valid low leave the accumulator alone. A dot product with
// fewer terms than a multiple of NPE pads unused lanes with zero operands,
// which every lane multiplies exactly to 0. Throughput is one beat per cycle,
// so a 3x3 kernel over 64 channels (576 products) takes 83 beats at NPE = 7.
// Reset (rst_n low, asynchronous) clears the accumulator and out_valid.
//
// The flavours, their blending and the exact accumulation follow the design;
// the lane count, the blend 2:5 (derived from the multipliers' mean errors),
// the accumulator width and the first/last handshake are this
// implementation's choices.
module approx_mac
  import mac_pkg::*;
#(
  parameter int unsigned W      = 16,  // approximate columns in each multiplier
  parameter int unsigned NUM_PM = 2,   // positive multipliers per blend period
  parameter int unsigned NUM_NM = 5,   // negative multipliers per blend period
  parameter int unsigned NPE    = 7,   // parallel lanes
  parameter int unsigned ACC_W  = 32   // accumulator width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        in_first,
  input  logic                        in_last,
  input  logic [NPE-1:0][OP_W-1:0]    in_a,
  input  logic [NPE-1:0][OP_W-1:0]    in_b,
  output logic                        out_valid,
  output logic [ACC_W-1:0]            out_acc
);

  localparam int unsigned SUM_W = PROD_W + $clog2(NPE + 1);

  if (ACC_W < SUM_W) begin : g_bad_acc
    $error("approx_mac: ACC_W must hold at least one beat's sum");
  end

  // ---------------------------------------------------------------- lanes
  logic [NPE-1:0][PROD_W-1:0] prod;

  for (genvar k = 0; k < NPE; k++) begin : g_lane
    approx_mult #(.W(W), .KIND(lane_kind(k, NUM_PM, NUM_NM))) u_mult (
      .a(in_a[k]),
      .b(in_b[k]),
      .p(prod[k])
    );
  end

  // ---------------------------------------------------------------- exact lane sum
  logic [SUM_W-1:0] beat_sum;

  always_comb begin
    beat_sum = '0;
    for (int k = 0; k < NPE; k++)
      beat_sum = beat_sum + SUM_W'(prod[k]);
  end

  // ---------------------------------------------------------------- accumulator
  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid)
        acc <= (in_first ? '0 : acc) + ACC_W'(beat_sum);
    end
  end

  assign out_acc = acc;

  // Framing flags only mean something on a valid beat.
  a_flags_on_beat : assert property (@(posedge clk) disable iff (!rst_n)
    (in_first || in_last) |-> in_valid)
    else $error("approx_mac: in_first/in_last raised without in_valid");

endmodule

// Shared types and constants of the error-balanced approximate MAC.
//
// The multiplier comes in two flavours built on the same Figure-1 style
// compressor tree: the positive multiplier (PM) uses the positive approximate
// compressor (PC) and errs upwards on average, the negative multiplier (NM)
// uses the negative compressor (NC) and errs downwards. The MAC assigns a
// flavour to every lane at elaboration time; lane_kind() spreads the PM lanes
// evenly over the lanes so that every run of NUM_PM+NUM_NM consecutive lanes
// holds NUM_PM positive multipliers.
package mac_pkg;

  // Operand width of the multiplier (8x8 unsigned, as the design is drawn).
  localparam int unsigned OP_W   = 8;
  localparam int unsigned PROD_W = 2 * OP_W;

  typedef enum logic {
    MUL_PM = 1'b0,  // positive-error multiplier, PC compressors
    MUL_NM = 1'b1   // negative-error multiplier, NC compressors
  } mult_kind_e;

  // Flavour of lane k for a PM:NM blend of num_pm:num_nm. A lane is positive
  // when (k * num_pm) mod (num_pm + num_nm) < num_pm, which places the positive
  // lanes as evenly as possible (for 2:5 they are lanes 0 and 4 of each 7).
  function automatic mult_kind_e lane_kind(int unsigned k, int unsigned num_pm,
                                           int unsigned num_nm);
    int unsigned period;
    period = num_pm + num_nm;
    if (num_pm == 0) return MUL_NM;
    if (num_nm == 0) return MUL_PM;
    return ((k * num_pm) % period < num_pm) ? MUL_PM : MUL_NM;
  endfunction

endpackage

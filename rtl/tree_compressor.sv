// One 4-2 compressor site of the multiplier's reduction tree.
//
// A site in column COL is approximate when COL < W: it then holds the positive
// (PC) or negative (NC) carry-free compressor, chosen by KIND, its carry-in is
// ignored and its carry-out is 0. Otherwise it holds the exact compressor with
// the carry chain passing through. Combinational.
// Carry-free approximate sites follow the published design; packaging a site
// as its own module is this implementation's choice.
module tree_compressor
  import mac_pkg::*;
#(
  parameter int unsigned COL  = 0,
  parameter int unsigned W    = 16,
  parameter mult_kind_e  KIND = MUL_PM
) (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  if (COL < W) begin : g_approx
    if (KIND == MUL_PM) begin : g_pc
      pos_compressor u_pc (.x(x), .sum(sum), .carry(carry));
    end else begin : g_nc
      neg_compressor u_nc (.x(x), .sum(sum), .carry(carry));
    end
    // An approximate site has no carry chain: cin is dropped (it is 0 from
    // every site the tree connects below W) and no carry leaves.
    logic unused_cin;
    assign unused_cin = cin;
    assign cout = 1'b0;
  end else begin : g_exact
    exact_compressor u_ex (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));
  end

endmodule

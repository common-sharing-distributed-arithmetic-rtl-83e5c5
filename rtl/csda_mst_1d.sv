// One-dimensional CSDA multi-standard transform core (1-D CSDA-MST).
//
// Transforms eight samples per cycle along eight parallel paths:
//   selected butterfly -> even part + odd part -> eight ECATs -> permutation.
// In the 8-point modes the output is the 8-point transform T0..T7 of x0..x7.
// In the 4-point modes x0..x3 and x4..x7 are two vectors and T0..T3, T4..T7
// their 4-point transforms. Each output is round(C.x / 2^shift) as defined in
// mst_pkg, within the ECAT error of +/-2 LSB, saturated to OUT_W bits.
//
// Following the design description, no pipeline registers are placed inside
// the core: it is one combinational path, and the register stage that
// surrounds it belongs to the instantiating design.
//
// Interface: x[8] signed IN_W-bit, mode; y[8] signed OUT_W-bit.
module csda_mst_1d
  import mst_pkg::*;
#(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 12
) (
  input  logic signed [IN_W-1:0]  x [8],
  input  mode_e                   mode,
  output logic signed [OUT_W-1:0] y [8]
);
  localparam int unsigned TW = IN_W + 3;

  logic                     four;
  logic [3:0]               shift;
  logic signed [IN_W:0]     a [4];
  logic signed [IN_W:0]     b [4];
  logic signed [TW-1:0]     te [4][CW];
  logic signed [TW-1:0]     to [4][CW];
  logic signed [OUT_W-1:0]  ze [4];
  logic signed [OUT_W-1:0]  zo [4];

  assign four  = is_four_point(mode);
  assign shift = out_shift(mode);

  sbf #(.W(IN_W)) u_sbf (.x(x), .four_point(four), .a(a), .b(b));

  even_part #(.W(IN_W + 1)) u_even (.a(a), .mode(mode), .t(te));
  odd_part  #(.W(IN_W + 1)) u_odd  (.b(b), .mode(mode), .t(to));

  for (genvar r = 0; r < 4; r++) begin : g_ecat
    ecat #(.TW(TW), .OW(OUT_W)) u_ecat_e (.t(te[r]), .shift(shift), .y(ze[r]));
    ecat #(.TW(TW), .OW(OUT_W)) u_ecat_o (.t(to[r]), .shift(shift), .y(zo[r]));
  end

  permutation #(.W(OUT_W)) u_perm (.ze(ze), .zo(zo), .four_point(four), .t(y));
endmodule

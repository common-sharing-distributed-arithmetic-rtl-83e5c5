// Odd part of the common sharing distributed arithmetic (CSDA) datapath.
//
// 8-point modes: computes the odd outputs
//     Z1 = C1 b0 + C3 b1 + C5 b2 + C7 b3     Z3 = C3 b0 - C7 b1 - C1 b2 - C5 b3
//     Z5 = C5 b0 - C1 b1 + C7 b2 + C3 b3     Z7 = C7 b0 - C5 b1 + C3 b2 - C1 b3
// 4-point modes: the same hardware computes the second 4-point transform
// (rows C4/C2/C6 with the 4-point sign pattern) on b = x4..x7.
// Distributed arithmetic: for every coefficient bit plane w and row r the
// term is the sum of the inputs b_j, with the row's sign, whose coefficient
// magnitude has bit w set. The coefficient bits come from the selected
// standard, so each input of a term adder is a multiplexer between 0 and the
// signed b_j driven by the standard's selection signals. The odd equations
// follow the design description; the term adders are the simplest structure
// that realises them (the description's figure shows a finer sharing that is
// not reproduced here).
//
// Interface: b[4] signed W-bit, mode; t[4][CW] signed (W+2)-bit terms, rows
// Z1, Z3, Z5, Z7 (8-point) or y0..y3 of the second 4-point vector.
// Combinational.
module odd_part
  import mst_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic signed [W-1:0] b [4],
  input  mode_e               mode,
  output logic signed [W+1:0] t [4][CW]
);
  logic                four;
  logic signed [W+1:0] sb  [4][4];   // input j with the sign of row r
  coef_t               mag [4][4];   // coefficient magnitude of row r, input j
  logic signed [W+1:0] acc;
  int                  k;

  always_comb begin
    four = is_four_point(mode);
    for (int r = 0; r < 4; r++) begin
      for (int j = 0; j < 4; j++) begin
        k = odd_index(four, 2'(r), 2'(j));
        mag[r][j] = coef(mode, (k < 0) ? -k : k);
        sb[r][j]  = (k < 0) ? -(W+2)'(b[j]) : (W+2)'(b[j]);
      end
    end
    for (int r = 0; r < 4; r++) begin
      for (int w = 0; w < CW; w++) begin
        acc = '0;
        for (int j = 0; j < 4; j++) acc = acc + (mag[r][j][w] ? sb[r][j] : '0);
        t[r][w] = acc;
      end
    end
  end
endmodule

// Permutation block: puts the eight ECAT results into sequential order.
//
// The ECATs deliver the even results (Z0, Z2, Z4, Z6) and the odd results
// (Z1, Z3, Z5, Z7) as two groups. For an 8-point transform the output is
// T_k = Z_k. For the 4-point modes the even group is the first 4-point
// result and the odd group the second, so T0..T3 = even group and
// T4..T7 = odd group. The input grouping follows the design description; the
// 4-point ordering is this design's choice.
//
// Interface: ze[4], zo[4] signed W-bit, four_point; t[8] signed W-bit.
// Combinational.
module permutation #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] ze [4],
  input  logic signed [W-1:0] zo [4],
  input  logic                four_point,
  output logic signed [W-1:0] t  [8]
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (four_point) begin
        t[i]     = ze[i];
        t[i + 4] = zo[i];
      end else begin
        t[2*i]     = ze[i];
        t[2*i + 1] = zo[i];
      end
    end
  end
endmodule

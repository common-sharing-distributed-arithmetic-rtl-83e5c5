// Even part of the common sharing distributed arithmetic (CSDA) datapath.
//
// Computes the even outputs Z0, Z2, Z4, Z6 of an 8-point transform (or the
// four outputs of a 4-point transform) in distributed-arithmetic form. A first
// butterfly stage forms A0 = a0+a3, A1 = a1+a2, B0 = a0-a3, B1 = a1-a2. A second
// stage forms the shared factors A0+A1, A0-A1, B0+B1 and B0-B1. Then
//     Z0 = C4 (A0+A1)         Z4 = C4 (A0-A1)
//     Z2 = C2 B0 + C6 B1      Z6 = C6 B0 - C2 B1
// For every coefficient bit plane w the term of each row is one of the
// shared values, picked by a multiplexer from the bits of C2/C4/C6 of the
// selected standard:
//     row Z2: {c2[w],c6[w]} -> 0, B1, B0, B0+B1
//     row Z6: {c6[w],c2[w]} -> 0, -B1, B0, B0-B1
// The output terms t[r][w] (weight 2^w) are summed by the ECATs.
// The two-stage butterfly and the factor sharing follow the design
// description; the term selection encoding is this design's own.
//
// Interface: a[4] signed W-bit (from the SBF), mode; t[4][CW] signed
// (W+2)-bit terms, rows in the order Z0, Z2, Z4, Z6. Combinational.
module even_part
  import mst_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic signed [W-1:0] a [4],
  input  mode_e               mode,
  output logic signed [W+1:0] t [4][CW]
);
  logic signed [W:0]   A0, A1, B0, B1;
  logic signed [W+1:0] s_ee, d_ee, s_eo, d_eo;
  coef_t c2, c4, c6;

  always_comb begin
    A0 = (W+1)'(a[0]) + (W+1)'(a[3]);
    A1 = (W+1)'(a[1]) + (W+1)'(a[2]);
    B0 = (W+1)'(a[0]) - (W+1)'(a[3]);
    B1 = (W+1)'(a[1]) - (W+1)'(a[2]);
    s_ee = (W+2)'(A0) + (W+2)'(A1);
    d_ee = (W+2)'(A0) - (W+2)'(A1);
    s_eo = (W+2)'(B0) + (W+2)'(B1);
    d_eo = (W+2)'(B0) - (W+2)'(B1);
    c2 = coef(mode, 2);
    c4 = coef(mode, 4);
    c6 = coef(mode, 6);
    for (int w = 0; w < CW; w++) begin
      t[0][w] = c4[w] ? s_ee : '0;
      t[2][w] = c4[w] ? d_ee : '0;
      unique case ({c2[w], c6[w]})
        2'b00: t[1][w] = '0;
        2'b01: t[1][w] = (W+2)'(B1);
        2'b10: t[1][w] = (W+2)'(B0);
        default: t[1][w] = s_eo;
      endcase
      unique case ({c6[w], c2[w]})
        2'b00: t[3][w] = '0;
        2'b01: t[3][w] = -(W+2)'(B1);
        2'b10: t[3][w] = (W+2)'(B0);
        default: t[3][w] = d_eo;
      endcase
    end
  end
endmodule

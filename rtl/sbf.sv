// Selected butterfly (SBF): first stage of a 1-D pass.
//
// For an 8-point transform it forms the symmetric sums and differences
//     a_i = x_i + x_(7-i),   b_i = x_i - x_(7-i)      (i = 0..3)
// which feed the even and the odd part. For the 4-point modes the eight
// samples are two independent 4-point vectors; the butterfly is bypassed by
// eight 2:1 multiplexers, so a = x0..x3 (first vector, to the even part) and
// b = x4..x7 (second vector, to the odd part). Four adders, four subtracters
// and eight multiplexers, as in the design description; the bypass ordering
// of b is this design's choice.
//
// Interface: x[8] signed W-bit samples, four_point selects the bypass;
// a[4], b[4] signed (W+1)-bit. Purely combinational, no clock.
module sbf #(
  parameter int unsigned W = 9
) (
  input  logic signed [W-1:0] x [8],
  input  logic                four_point,
  output logic signed [W:0]   a [4],
  output logic signed [W:0]   b [4]
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i] = four_point ? (W+1)'(x[i])   : (W+1)'(x[i]) + (W+1)'(x[7-i]);
      b[i] = four_point ? (W+1)'(x[i+4]) : (W+1)'(x[i]) - (W+1)'(x[7-i]);
    end
  end
endmodule

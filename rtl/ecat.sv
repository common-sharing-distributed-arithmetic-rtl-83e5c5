// Error-compensated adder tree (ECAT) for one transform output.
//
// Sums the distributed-arithmetic terms t[w] with weight 2^w and scales the
// result by 2^-shift. To keep the tree small the columns below 2^shift are not
// added: every term with w < shift is truncated (floor of t[w] * 2^(w-shift)).
// The carry lost by the truncation is estimated from the most significant
// truncated column: with p ones in that column and n truncated terms, the
// compensation added to the result is
//     comp = (p + floor(n/2) + 1) >> 1
// i.e. half the ones of that column, a quarter per truncated term for the
// columns below it, and one half for rounding to nearest. The result is
// saturated to OW bits. Truncation with a carry estimate from the top
// truncated column, built from a small counter fed with a constant 1, follows
// the design description; the exact estimate formula is this design's own.
// With exact arithmetic as reference the error stays within +/-2 LSB.
//
// Each term passes through one variable shifter,
//     u = floor(t[w] * 2^(w+1) / 2^shift),
// whose upper bits (u >>> 1) are the kept part and whose LSB u[0] is the
// term's bit in the top truncated column (always 0 when w >= shift).
//
// Interface: t[CW] signed TW-bit terms, shift (0..8); y signed OW-bit.
// Combinational.
module ecat
  import mst_pkg::*;
#(
  parameter int unsigned TW = 12,
  parameter int unsigned OW = 12
) (
  input  logic signed [TW-1:0] t [CW],
  input  logic [3:0]           shift,
  output logic signed [OW-1:0] y
);
  localparam int unsigned SW = TW + CW + 2;   // wide enough for the whole sum

  logic signed [SW-1:0] sum, ext, u;
  logic [3:0]           pop, ntr;
  logic [4:0]           comp;

  always_comb begin
    sum = '0;
    pop = '0;
    for (int w = 0; w < CW; w++) begin
      ext = SW'(t[w]);
      u   = (ext <<< (w + 1)) >>> shift;
      sum = sum + (u >>> 1);
      pop = pop + 4'(u[0]);
    end
    ntr  = (shift > 4'(CW)) ? 4'(CW) : shift;
    comp = (5'(pop) + 5'(ntr >> 1) + 5'd1) >> 1;
    sum  = sum + SW'(comp);
    if (sum > SW'(2 ** (OW - 1) - 1))   y = OW'(2 ** (OW - 1) - 1);
    else if (sum < -SW'(2 ** (OW - 1))) y = OW'(-(2 ** (OW - 1)));
    else                                y = OW'(sum);
  end
endmodule

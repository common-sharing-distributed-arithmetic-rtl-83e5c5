// Self-checking testbench of the odd part: in the 8-point modes the weighted
// sum of the terms of row r must equal odd output Z(2r+1) of the 8-point
// matrix applied to (b, -reversed b); in the 4-point modes it must equal row r
// of the 4-point matrix applied to b.
module tb_odd_part;
  import mst_pkg::*;
  import mst_ref_pkg::*;
  localparam int W = 10;
  logic signed [W-1:0] b [4];
  mode_e               mode;
  logic signed [W+1:0] t [4][CW];
  int checks = 0, failures = 0;

  odd_part #(.W(W)) dut (.b(b), .mode(mode), .t(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint got, exp;
    for (int it = 0; it < 500; it++) begin
      mode = mode_e'(it % 5);
      for (int i = 0; i < 4; i++) b[i] = W'($urandom);
      if (it < 10) for (int i = 0; i < 4; i++) b[i] = (it < 5) ? 10'sd511 : -10'sd512;
      #1;
      for (int r = 0; r < 4; r++) begin
        got = 0;
        for (int w = 0; w < CW; w++) got += longint'(t[r][w]) * (longint'(1) << w);
        exp = 0;
        if (ref_four(mode)) begin
          for (int n = 0; n < 4; n++) exp += ref_m(mode, 4, r, n) * longint'(b[n]);
        end else begin
          // Odd rows are antisymmetric, so row 2r+1 applied to x equals its
          // first half applied to b_n = x_n - x_(7-n).
          for (int n = 0; n < 4; n++) exp += ref_m(mode, 8, 2*r + 1, n) * longint'(b[n]);
        end
        checks++;
        if (got != exp) begin
          failures++;
          $display("mode %0d row %0d: got %0d exp %0d", mode, r, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

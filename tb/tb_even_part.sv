// Self-checking testbench of the even part: for every standard and random
// inputs, the weighted sum of the distributed-arithmetic terms of each row
// must equal the exact 4-point even-matrix product of that row.
module tb_even_part;
  import mst_pkg::*;
  import mst_ref_pkg::*;
  localparam int W = 10;
  logic signed [W-1:0] a [4];
  mode_e               mode;
  logic signed [W+1:0] t [4][CW];
  int checks = 0, failures = 0;

  even_part #(.W(W)) dut (.a(a), .mode(mode), .t(t));

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
      for (int i = 0; i < 4; i++) a[i] = W'($urandom);
      if (it < 10) for (int i = 0; i < 4; i++) a[i] = (it < 5) ? 10'sd511 : -10'sd512;
      #1;
      for (int r = 0; r < 4; r++) begin
        got = 0;
        for (int w = 0; w < CW; w++) got += longint'(t[r][w]) * (longint'(1) << w);
        exp = 0;
        for (int n = 0; n < 4; n++) exp += ref_m(mode, 4, r, n) * longint'(a[n]);
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

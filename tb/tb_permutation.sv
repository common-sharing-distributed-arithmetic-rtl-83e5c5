// Self-checking testbench of the permutation block: distinct values on the
// even and odd inputs must land on T0..T7 in sequential 8-point order, or as
// two 4-point groups in the 4-point setting.
module tb_permutation;
  localparam int W = 12;
  logic signed [W-1:0] ze [4];
  logic signed [W-1:0] zo [4];
  logic                four_point;
  logic signed [W-1:0] t  [8];
  int checks = 0, failures = 0;

  permutation #(.W(W)) dut (.ze(ze), .zo(zo), .four_point(four_point), .t(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int it = 0; it < 100; it++) begin
      for (int i = 0; i < 4; i++) begin ze[i] = W'($urandom); zo[i] = W'($urandom); end
      four_point = it[0];
      #1;
      for (int k = 0; k < 8; k++) begin
        if (four_point) e = (k < 4) ? int'(ze[k]) : int'(zo[k-4]);
        else            e = (k % 2 == 0) ? int'(ze[k/2]) : int'(zo[k/2]);
        checks++;
        if (int'(t[k]) != e) begin failures++; $display("T%0d=%0d exp %0d", k, t[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

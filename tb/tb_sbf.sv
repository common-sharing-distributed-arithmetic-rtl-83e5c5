// Self-checking testbench of the selected butterfly: random samples in the
// 8-point and the 4-point (bypass) setting, compared with the butterfly
// equations.
module tb_sbf;
  localparam int W = 9;
  logic signed [W-1:0] x [8];
  logic                four_point;
  logic signed [W:0]   a [4];
  logic signed [W:0]   b [4];
  int checks = 0, failures = 0;

  sbf #(.W(W)) dut (.x(x), .four_point(four_point), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int it = 0; it < 400; it++) begin
      for (int i = 0; i < 8; i++) x[i] = W'($urandom);
      if (it < 4) for (int i = 0; i < 8; i++) x[i] = (it[0]) ? -9'sd256 : 9'sd255;
      four_point = it[1];
      #1;
      for (int i = 0; i < 4; i++) begin
        ea = four_point ? int'(x[i])   : int'(x[i]) + int'(x[7-i]);
        eb = four_point ? int'(x[i+4]) : int'(x[i]) - int'(x[7-i]);
        checks += 2;
        if (int'(a[i]) != ea) begin failures++; $display("a[%0d]=%0d exp %0d", i, a[i], ea); end
        if (int'(b[i]) != eb) begin failures++; $display("b[%0d]=%0d exp %0d", i, b[i], eb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

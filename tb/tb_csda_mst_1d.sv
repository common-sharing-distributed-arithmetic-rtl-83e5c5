// Self-checking testbench of the 1-D CSDA-MST core at the first-stage sizes
// (9-bit in, 12-bit out): random and extreme rows in all five standards,
// compared bit for bit with the reference model, and within +/-2 LSB of the
// exactly rounded transform. The MPEG mode is also compared with the
// floating-point orthonormal DCT: the 8-bit coefficient quantisation and the
// adder-tree error together must stay within 6 LSB.
module tb_csda_mst_1d;
  import mst_pkg::*;
  import mst_ref_pkg::*;
  localparam int IW = 9, OW = 12;
  logic signed [IW-1:0] x [8];
  mode_e                mode;
  logic signed [OW-1:0] y [8];
  int checks = 0, failures = 0, maxerr = 0, maxdct = 0;

  csda_mst_1d #(.IN_W(IW), .OUT_W(OW)) dut (.x(x), .mode(mode), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv [8];
    longint yr [8];
    longint rnd, err;
    int s;
    for (int it = 0; it < 2000; it++) begin
      mode = mode_e'(it % 5);
      for (int i = 0; i < 8; i++) x[i] = IW'($urandom);
      if (it < 20) for (int i = 0; i < 8; i++)
        x[i] = (it < 10) ? ((i % 2 == 0) ? 9'sd255 : -9'sd256) : ((it < 15) ? 9'sd255 : -9'sd256);
      #1;
      for (int i = 0; i < 8; i++) xv[i] = longint'(x[i]);
      ref_1d(mode, xv, OW, yr);
      s = ref_shift(mode);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (longint'(y[k]) != yr[k]) begin
          failures++;
          $display("mode %0d T%0d: got %0d exp %0d", mode, k, y[k], yr[k]);
        end
        rnd = (ref_exact(mode, xv, k) + (longint'(1) << (s - 1))) >>> s;
        err = longint'(y[k]) - rnd;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = int'(err);
        checks++;
        if (err > 2) begin failures++; $display("mode %0d T%0d error %0d", mode, k, err); end
        if (mode == MODE_MPEG8) begin
          real acc, ck;
          longint dct;
          acc = 0.0;
          ck = (k == 0) ? $sqrt(0.125) : 0.5;
          for (int n = 0; n < 8; n++) acc += ck * $cos((2*n + 1) * k * 3.14159265358979 / 16.0) * real'(xv[n]);
          dct = longint'($floor(acc + 0.5));
          err = longint'(y[k]) - dct;
          if (err < 0) err = -err;
          if (err > maxdct) maxdct = int'(err);
          checks++;
          if (err > 6) begin failures++; $display("MPEG T%0d: %0d vs DCT %0d", k, y[k], dct); end
        end
      end
    end
    $display("max |error| vs rounded exact transform = %0d LSB, vs real DCT = %0d LSB", maxerr, maxdct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

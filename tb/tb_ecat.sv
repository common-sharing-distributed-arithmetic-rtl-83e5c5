// Self-checking testbench of the error-compensated adder tree: random terms
// and every shift 0..8, compared bit for bit with an integer model of the
// truncation and carry estimate; in addition the result must stay within
// +/-2 LSB of the exactly rounded weighted sum, and saturation is exercised.
module tb_ecat;
  import mst_pkg::*;
  import mst_ref_pkg::*;
  localparam int TW = 12, OW = 12;
  logic signed [TW-1:0] t [CW];
  logic [3:0]           shift;
  logic signed [OW-1:0] y;
  int checks = 0, failures = 0, maxerr = 0, sat_seen = 0;

  ecat #(.TW(TW), .OW(OW)) dut (.t(t), .shift(shift), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint d [7];
    longint exp, exact, rnd, err;
    for (int it = 0; it < 4000; it++) begin
      shift = 4'(it % 9);
      for (int w = 0; w < CW; w++) begin
        // small terms keep the sum in range; every 7th vector uses full-range
        // terms to reach saturation
        t[w] = (it % 7 == 0) ? TW'($urandom) : TW'($signed(9'($urandom)));
        d[w] = longint'(t[w]);
      end
      #1;
      exp = ref_ecat(d, int'(shift), OW);
      checks++;
      if (longint'(y) != exp) begin
        failures++;
        $display("shift %0d: got %0d exp %0d", shift, y, exp);
      end
      exact = 0;
      for (int w = 0; w < CW; w++) exact += d[w] * (longint'(1) << w);
      rnd = (exact + ((shift > 0) ? (longint'(1) << (shift - 1)) : 0)) >>> shift;
      if (rnd > 2047 || rnd < -2048) begin
        sat_seen++;
        checks++;
        if (longint'(y) != ((rnd > 0) ? 2047 : -2048)) begin
          failures++;
          $display("saturation: got %0d for %0d", y, rnd);
        end
      end else begin
        err = longint'(y) - rnd;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = int'(err);
        checks++;
        if (err > 2) begin
          failures++;
          $display("error %0d too large (shift %0d, y %0d, exact/2^s %0d)", err, shift, y, rnd);
        end
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never reached"); end
    $display("max |error| vs rounded exact = %0d LSB, saturated cases = %0d", maxerr, sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

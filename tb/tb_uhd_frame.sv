// Workload testbench: one whole 4928x2048 frame.
//
// The frame is 256 bands of 8 lines, each 616 8x8 blocks wide: 157,696 blocks.
// A synthetic residual image (a smooth gradient with texture and noise, 9-bit
// signed) is streamed back to back through the 2-D core at its default
// sizes, band after band, the bands cycling through all five standards.
// Every coefficient is compared with the reference 2-D transform, and the
// whole stream must take exactly 8 cycles per block plus the 9-cycle latency.
module tb_uhd_frame;
  import mst_pkg::*;
  import mst_ref_pkg::*;
  localparam int WIDTH  = 4928;
  localparam int BX     = WIDTH / 8;        // blocks per band
  localparam int BANDS  = 2048 / 8;
  localparam int NBLK   = BX * BANDS;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  mode_e in_mode = MODE_MPEG8, out_mode;
  logic [2:0] out_col;
  logic signed [8:0]  x [8];
  logic signed [13:0] y [8];

  int checks = 0, failures = 0;
  int unsigned cyc = 0, first_in_cyc = 0, last_out_cyc = 0;
  int out_blk = 0, out_n = 0;
  longint ref_out [8][8];

  csda_mst_2d dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic mode_e band_mode(int band);
    mode_e m [5];
    m = '{MODE_MPEG8, MODE_H264_4, MODE_VC1_8, MODE_H264_8, MODE_VC1_4};
    return m[band % 5];
  endfunction

  // Synthetic residual pixel at line r, column c (deterministic hash noise).
  function automatic longint pix(int r, int c);
    int v, h;
    h = (r * 1103 + c * 2971) ^ (r * c);
    v = ((c * 3 + r * 5) % 200) - 100 + ((h >> 3) % 41) - 20 + (((h >> 7) & 1) ? 60 : -60);
    if (v > 255) v = 255;
    if (v < -256) v = -256;
    return longint'(v);
  endfunction

  task automatic make_ref(int n);
    longint row [8], res [8];
    longint mid [8][8];
    int band, bx;
    band = n / BX;
    bx = n % BX;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) row[c] = pix(band * 8 + r, bx * 8 + c);
      ref_1d(band_mode(band), row, 12, res);
      mid[r] = res;
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) row[r] = mid[r][c];
      ref_1d(band_mode(band), row, 14, res);
      for (int k = 0; k < 8; k++) ref_out[k][c] = res[k];
    end
  endtask

  initial begin
    repeat (NBLK * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_n == 0) make_ref(out_blk);
    checks++;
    if (int'(out_col) != out_n || out_mode != band_mode(out_blk / BX)) begin
      failures++;
      $display("block %0d: col %0d mode %0d", out_blk, out_col, out_mode);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (longint'(y[k]) != ref_out[k][out_n]) begin
        failures++;
        if (failures < 20)
          $display("block %0d coef (%0d,%0d): got %0d exp %0d", out_blk, k, out_n, y[k], ref_out[k][out_n]);
      end
    end
    last_out_cyc = cyc;
    out_n++;
    if (out_n == 8) begin out_n = 0; out_blk++; end
  end

  initial begin
    for (int k = 0; k < 8; k++) x[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      for (int r = 0; r < 8; r++) begin
        in_valid = 1;
        in_mode = band_mode(n / BX);
        for (int c = 0; c < 8; c++) x[c] = 9'(pix((n / BX) * 8 + r, (n % BX) * 8 + c));
        if (n == 0 && r == 0) first_in_cyc = cyc;
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (out_blk != NBLK) begin failures++; $display("only %0d of %0d blocks", out_blk, NBLK); end
    checks++;
    if (last_out_cyc - first_in_cyc != NBLK * 8 + 8) begin
      failures++;
      $display("stream took %0d cycles, expected %0d", last_out_cyc - first_in_cyc, NBLK * 8 + 8);
    end
    $display("%0d blocks (%0d bands of %0d pixels) in %0d cycles", out_blk, BANDS, WIDTH,
             last_out_cyc - first_in_cyc + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

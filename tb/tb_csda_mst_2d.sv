// End-to-end testbench of the 2-D CSDA-MST core at its default sizes
// (9-bit input, 12-bit transposition memory, 14-bit output).
//
// Phase 1 streams blocks back to back, cycling through all five standards,
// and checks the rate and latency: one row accepted and one output column
// produced per cycle, and column j of the stream leaving the output register
// exactly 9 cycles after the first row of the stream plus j. Phase 2 adds
// pauses inside blocks and idle periods between blocks, which make the
// transposition memory drain a block by itself and stall the input.
// Every output column is compared bit for bit with a reference 2-D transform
// (reference 1-D pass on the rows, transposition, reference 1-D pass on the
// columns). Mechanisms counted, each of which must occur: every standard,
// mode switches between consecutive blocks, 4-point bypass blocks,
// drains with input stall, and pauses inside a block.
module tb_csda_mst_2d;
  import mst_pkg::*;
  import mst_ref_pkg::*;
  localparam int NB1 = 10;          // back-to-back blocks
  localparam int NB  = 40;          // total blocks

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  mode_e in_mode = MODE_MPEG8, out_mode;
  logic [2:0] out_col;
  logic signed [8:0]  x [8];
  logic signed [13:0] y [8];

  int checks = 0, failures = 0;
  int mode_used [5];
  int switches = 0, four_blocks = 0, stall_cycles = 0, pauses = 0, drains = 0;
  int unsigned cyc = 0, first_in_cyc = 0;

  longint blk_in  [NB][8][8];
  longint blk_out [NB][8][8];   // [k][col]
  mode_e  bmode [NB];
  int out_blk = 0, out_n = 0, out_total = 0;

  csda_mst_2d dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference 2-D transform of block n.
  task automatic make_ref(int n);
    longint row [8], res [8];
    longint mid [8][8];
    for (int r = 0; r < 8; r++) begin
      row = blk_in[n][r];
      ref_1d(bmode[n], row, 12, res);
      mid[r] = res;
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) row[r] = mid[r][c];
      ref_1d(bmode[n], row, 14, res);
      for (int k = 0; k < 8; k++) blk_out[n][k][c] = res[k];
    end
  endtask

  logic draining_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stall_cycles++;
    if (!in_ready && !draining_q) drains++;
    draining_q <= !in_ready;
    if (out_valid) begin
      checks++;
      if (out_blk >= NB || int'(out_col) != out_n || out_mode != bmode[out_blk]) begin
        failures++;
        $display("block %0d: col %0d (exp %0d) mode %0d", out_blk, out_col, out_n, out_mode);
      end else begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (longint'(y[k]) != blk_out[out_blk][k][out_n]) begin
            failures++;
            $display("block %0d (mode %0d) coef (%0d,%0d): got %0d exp %0d", out_blk,
                     bmode[out_blk], k, out_n, y[k], blk_out[out_blk][k][out_n]);
          end
        end
        if (out_blk < NB1) begin
          checks++;
          if (cyc != first_in_cyc + 9 + out_total) begin
            failures++;
            $display("column %0d of stream at cycle %0d, expected %0d",
                     out_total, cyc, first_in_cyc + 9 + out_total);
          end
        end
      end
      out_total++;
      out_n++;
      if (out_n == 8) begin out_n = 0; out_blk++; end
    end
  end

  initial begin
    for (int n = 0; n < NB; n++) begin
      bmode[n] = (n < NB1) ? mode_e'(n % 5) : mode_e'($urandom_range(0, 4));
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        blk_in[n][r][c] = longint'($signed(9'($urandom)));
      if (n == 1) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) blk_in[n][r][c] = 255;
      if (n == 2) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) blk_in[n][r][c] = -256;
      if (n == 3) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        blk_in[n][r][c] = ((r + c) % 2 == 0) ? 255 : -256;
      make_ref(n);
      mode_used[int'(bmode[n])]++;
      if (ref_four(bmode[n])) four_blocks++;
      if (n > 0 && bmode[n] != bmode[n-1]) switches++;
    end
    for (int k = 0; k < 8; k++) x[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NB; n++) begin
      if (n >= NB1 && n % 4 == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 12)) @(negedge clk);
      end
      for (int r = 0; r < 8; r++) begin
        if (n >= NB1 && r > 0 && $urandom_range(0, 4) == 0) begin
          pauses++;
          in_valid = 0;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        in_valid = 1;
        in_mode = bmode[n];
        for (int k = 0; k < 8; k++) x[k] = 9'(blk_in[n][r][k]);
        if (n == 0 && r == 0) first_in_cyc = cyc;
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
      // the back-to-back stream ends with a drain
      if (n == NB1 - 1) begin
        in_valid = 0;
        repeat (12) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (out_blk != NB) begin failures++; $display("only %0d of %0d blocks came out", out_blk, NB); end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (mode_used[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    checks++;
    if (switches == 0 || four_blocks == 0 || stall_cycles == 0 || pauses == 0 || drains == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("blocks=%0d mode switches=%0d four-point blocks=%0d drains=%0d stall cycles=%0d pauses=%0d",
             out_blk, switches, four_blocks, drains, stall_cycles, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the transposition memory. Blocks of random
// 12-bit words are shifted in row by row, with pauses inside blocks and idle
// periods between blocks (which make the memory drain a stored block on its
// own and hold in_ready low). Every output column is compared with the
// transposed block, the mode tag must travel with its block, and in an
// unbroken stream column s of block n must leave in the same cycle as row s
// of block n+1 enters.
module tb_tmem;
  import mst_pkg::*;
  localparam int W = 12;
  localparam int NB = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  mode_e in_mode = MODE_MPEG8, out_mode;
  logic [2:0] out_col;
  logic signed [W-1:0] din [8];
  logic signed [W-1:0] dout [8];

  int checks = 0, failures = 0;
  int stalls = 0, pauses = 0;
  int unsigned cyc = 0;

  logic signed [W-1:0] blocks [NB][8][8];
  mode_e bmode [NB];
  int out_blk = 0, out_n = 0, in_row_now = -1;

  tmem #(.W(W)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: compare each output column with the transposed block.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid) begin
      checks++;
      if (out_blk >= NB || int'(out_col) != out_n || out_mode != bmode[out_blk]) begin
        failures++;
        $display("block %0d: col %0d (exp %0d) mode %0d", out_blk, out_col, out_n, out_mode);
      end else begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (dout[k] != blocks[out_blk][k][out_n]) begin
            failures++;
            $display("block %0d col %0d elem %0d: got %0d exp %0d",
                     out_blk, out_n, k, dout[k], blocks[out_blk][k][out_n]);
          end
        end
        // overlap: while a row of the next block is taken, its index is the column index
        if (in_valid && in_ready) begin
          checks++;
          if (in_row_now != out_n) begin
            failures++;
            $display("overlap: column %0d left with row %0d", out_n, in_row_now);
          end
        end
      end
      out_n++;
      if (out_n == 8) begin out_n = 0; out_blk++; end
    end
  end

  initial begin
    for (int n = 0; n < NB; n++) begin
      bmode[n] = mode_e'($urandom_range(0, 4));
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) blocks[n][r][c] = W'($urandom);
    end
    for (int k = 0; k < 8; k++) din[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      // idle between some blocks: long enough for a drain
      if (n % 5 == 4) begin
        in_valid = 0;
        repeat ($urandom_range(1, 12)) @(negedge clk);
      end
      for (int r = 0; r < 8; r++) begin
        if (n >= 10 && r > 0 && $urandom_range(0, 3) == 0) begin
          pauses++;
          in_valid = 0;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        in_valid = 1;
        in_mode = bmode[n];
        in_row_now = r;
        for (int k = 0; k < 8; k++) din[k] = blocks[n][r][k];
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (out_blk != NB) begin failures++; $display("only %0d of %0d blocks came out", out_blk, NB); end
    checks++;
    if (stalls == 0 || pauses == 0) begin failures++; $display("stall/pause never exercised"); end
    $display("blocks=%0d stall cycles=%0d pauses=%0d", out_blk, stalls, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

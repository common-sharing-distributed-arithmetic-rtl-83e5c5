// Transposition memory (TMEM): 8x8 register array between the two 1-D cores.
//
// 64 words of W bits, arranged as an 8x8 array in which every arr has a 2:1
// multiplexer choosing its left or its upper neighbour. The array shifts in
// one direction while a block is loaded and in the other direction for the
// next block, so that while block n+1 is shifted in row by row, block n
// leaves the array column by column: the transposition costs no extra
// storage and both 1-D passes run at the same time.
//   dir = 0: vectors enter at the top row and the array shifts down; the
//            block held before leaves through the bottom row.
//   dir = 1: vectors enter at the left column and the array shifts right;
//            the block held before leaves through the right column.
// Element orders inside the array are reversed on entry (see the index maps
// below) so that dout always carries column s of the stored block, element k
// in dout[k], for s = 0..7 in order.
//
// Flow control: a shift happens for every accepted input vector; a block is
// 8 accepted vectors (gaps inside a block are allowed and simply pause the
// array). When a complete block is stored and no new vector arrives at a block
// boundary, the array drains it by itself with 8 shifts of zeros, during which
// in_ready is low. The mode of each block travels with it to the output.
//
// Timing: out_valid is high on each shift that moves out a stored block;
// column s of block n appears in the same cycle as row s of block n+1 is
// accepted, i.e. 8 accepted vectors after row s of block n.
// The 8x8 array of cells with a multiplexer each and the 64-word size follow
// the design description; direction control, drain and handshake are this
// design's own.
module tmem
  import mst_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  mode_e               in_mode,
  input  logic signed [W-1:0] din  [8],
  output logic                out_valid,
  output mode_e               out_mode,
  output logic [2:0]          out_col,
  output logic signed [W-1:0] dout [8]
);
  logic signed [W-1:0] arr [8][8];
  logic       dir;        // current shift direction
  logic [2:0] cnt;        // vectors shifted in the current block
  logic       full;       // a complete block waits to be moved out
  logic       draining;   // an 8-shift drain is in progress
  logic       fill_data;  // the block being shifted in carries data
  mode_e      fill_mode, blk_mode;

  logic drain_start, take, shift;

  assign drain_start = !draining && full && (cnt == 3'd0) && !in_valid;
  assign in_ready    = !draining;
  assign take        = in_valid && in_ready;
  assign shift       = take || draining || drain_start;

  assign out_valid = shift && full;
  assign out_mode  = blk_mode;
  assign out_col   = cnt;

  always_comb begin
    for (int k = 0; k < 8; k++)
      dout[k] = dir ? arr[7-k][7] : arr[7][7-k];
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      if (!dir) begin
        for (int i = 7; i > 0; i--) arr[i] <= arr[i-1];
        for (int j = 0; j < 8; j++) arr[0][j] <= take ? din[7-j] : '0;
      end else begin
        for (int i = 0; i < 8; i++) begin
          for (int j = 7; j > 0; j--) arr[i][j] <= arr[i][j-1];
          arr[i][0] <= take ? din[7-i] : '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dir       <= 1'b0;
      cnt       <= '0;
      full      <= 1'b0;
      draining  <= 1'b0;
      fill_data <= 1'b0;
      fill_mode <= MODE_MPEG8;
      blk_mode  <= MODE_MPEG8;
    end else if (shift) begin
      cnt <= cnt + 3'd1;
      if (cnt == 3'd0) begin
        fill_data <= take;
        fill_mode <= in_mode;
        if (drain_start) draining <= 1'b1;
      end
      if (cnt == 3'd7) begin
        dir      <= !dir;
        full     <= fill_data;
        blk_mode <= fill_mode;
        draining <= 1'b0;
      end
    end
  end

  // A block is either all data or all drain: no vector is accepted mid-drain,
  // and a drain only starts on a block boundary.
  a_no_take_in_drain: assert property (@(posedge clk) disable iff (!rst_n)
    draining |-> !take);
  a_drain_on_boundary: assert property (@(posedge clk) disable iff (!rst_n)
    drain_start |-> cnt == 3'd0);
endmodule

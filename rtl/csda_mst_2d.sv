// Two-dimensional CSDA multi-standard transform core (2-D CSDA-MST), top level.
//
// A 2-D forward transform of 8x8 blocks (or of four 4x4 blocks packed into
// an 8x8 block for the 4-point modes) for MPEG-1/2/4, H.264 and VC-1:
//   rows of 9-bit samples -> 1-D core 1 (12-bit results)
//                         -> transposition memory (8x8 x 12 bit)
//                         -> 1-D core 2 (14-bit results) -> output register.
// Core 1 transforms the rows of block n+1 while core 2 transforms the columns
// of block n, so both passes run at the same time at one 8-sample vector per
// cycle. The cores contain no pipeline registers; the transposition array and
// the output register are the only storage.
//
// Interface (valid/ready):
//   x[8], in_mode, in_valid / in_ready : one row of a block per transfer; a
//       block is 8 rows; in_mode is sampled on the first row of a block.
//       in_ready drops only while a finished block is drained because no new
//       block followed it.
//   y[8], out_col, out_mode, out_valid : one output column per cycle:
//       y[k] is coefficient (k, out_col) of the 2-D transform of a block.
// Timing: column s of block n leaves the output register one cycle after row
// s of block n+1 was accepted (or after the corresponding drain step).
// Widths 9/12/14 bits follow the design description; the handshake is this
// design's own.
module csda_mst_2d
  import mst_pkg::*;
#(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned MID_W = 12,
  parameter int unsigned OUT_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  mode_e                   in_mode,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output mode_e                   out_mode,
  output logic [2:0]              out_col,
  output logic signed [OUT_W-1:0] y [8]
);
  logic signed [MID_W-1:0] row_t  [8];
  logic signed [MID_W-1:0] col_in [8];
  logic signed [OUT_W-1:0] col_t  [8];
  logic                    t_valid;
  mode_e                   t_mode;
  logic [2:0]              t_col;

  csda_mst_1d #(.IN_W(IN_W), .OUT_W(MID_W)) u_core1 (
    .x(x), .mode(in_mode), .y(row_t));

  tmem #(.W(MID_W)) u_tmem (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_mode(in_mode), .din(row_t),
    .out_valid(t_valid), .out_mode(t_mode), .out_col(t_col), .dout(col_in));

  csda_mst_1d #(.IN_W(MID_W), .OUT_W(OUT_W)) u_core2 (
    .x(col_in), .mode(t_mode), .y(col_t));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mode  <= MODE_MPEG8;
      out_col   <= '0;
      for (int k = 0; k < 8; k++) y[k] <= '0;
    end else begin
      out_valid <= t_valid;
      if (t_valid) begin
        out_mode <= t_mode;
        out_col  <= t_col;
        y        <= col_t;
      end
    end
  end
endmodule

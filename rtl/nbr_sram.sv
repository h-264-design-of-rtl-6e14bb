// Predictor memory of one colour plane (one instance each for Y, Cb, Cr).
//
// The design keeps in an internal SRAM the reconstructed pixels that later
// blocks use as predictors. This module holds, for one plane:
//   * a line memory of IMG_W pixels (IMG_W/4 words of four pixels) with the
//     bottom pixel row of the macroblock row above (for a 640-pixel-wide
//     picture this is the 640-pixel line the design stores);
//   * the right-hand pixel column of the macroblock to the left;
//   * the corner pixel above-left of the current macroblock;
//   * the reconstructed pixels of the current macroblock (MB_N x MB_N),
//     which supply the neighbours of the later 4x4 blocks inside it.
// Rows of four reconstructed pixels are written with wr_en at (wr_row,
// wr_col4) inside the macroblock. The write of the last row of the last
// 4x4 block of the macroblock also retires the macroblock: its bottom row
// goes into the line memory at column mb_x, its right column becomes the
// left column, and the line pixel above-left of the next macroblock is kept
// as the next corner. All reads are combinational (an asynchronous-read
// array); writes take effect at the clock edge.
//
// The split into line memory, left column, corner and current block is
// this design's own; the document states only that the predictors are
// kept in one SRAM per plane.
module nbr_sram
  import intra_pkg::*;
#(
  parameter int MB_N  = 16,
  parameter int IMG_W = 640,
  localparam int NW   = IMG_W / 4,
  localparam int MBX_W = $clog2(IMG_W / MB_N)
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [MBX_W-1:0]   mb_x,
  input  logic               wr_en,
  input  logic [3:0]         wr_row,
  input  logic [1:0]         wr_col4,
  input  pix_t               wr_pix [4],
  output pix_t               top_line [MB_N+4],
  output pix_t               left_col [MB_N],
  output pix_t               corner,
  output pix_t               cur [MB_N][MB_N]
);

  localparam int WPM = MB_N / 4;   // words per macroblock width

  logic [31:0] line_mem [NW];
  pix_t        left_q [MB_N];
  pix_t        corner_q;
  pix_t        cur_q [MB_N][MB_N];

  logic        mb_last;
  pix_t        bottom [MB_N];

  assign mb_last = wr_en && (int'(wr_row) == MB_N-1) && (int'(wr_col4) == WPM-1);

  // Bottom row of the macroblock, including the row being written now.
  always_comb begin
    for (int i = 0; i < MB_N; i++) bottom[i] = cur_q[MB_N-1][i];
    for (int k = 0; k < 4; k++) bottom[MB_N-4+k] = wr_pix[k];
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int k = 0; k < 4; k++) cur_q[int'(wr_row)][4*int'(wr_col4)+k] <= wr_pix[k];
    end
    if (mb_last) begin
      for (int w = 0; w < WPM; w++)
        line_mem[int'(mb_x)*WPM + w] <= {bottom[4*w+3], bottom[4*w+2], bottom[4*w+1], bottom[4*w]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < MB_N; i++) left_q[i] <= '0;
      corner_q <= '0;
    end else if (mb_last) begin
      for (int i = 0; i < MB_N-1; i++) left_q[i] <= cur_q[i][MB_N-1];
      left_q[MB_N-1] <= wr_pix[3];
      corner_q <= line_mem[int'(mb_x)*WPM + WPM-1][31:24];
    end
  end

  // Line pixels above the current macroblock and the four to its right.
  always_comb begin
    for (int w = 0; w <= WPM; w++) begin
      logic [31:0] word;
      int          idx;
      idx  = int'(mb_x)*WPM + w;
      word = (idx < NW) ? line_mem[idx] : 32'd0;
      for (int k = 0; k < 4; k++) top_line[4*w+k] = word[8*k +: 8];
    end
  end

  assign left_col = left_q;
  assign corner   = corner_q;
  assign cur      = cur_q;

endmodule

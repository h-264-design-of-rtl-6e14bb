// Output data generator.
//
// Presents the prediction values as rows of four, OUT0..OUT3, one row of a
// 4x4 block at a time, as the IDCT delivers its residuals. A row is formed
// on commit from one of five sources:
//   0: a row given directly (horizontal and vertical modes);
//   1: R0, R1, R2 of the register file plus the current COU result
//      (luma 4x4 directional modes);
//   2: three internal staging lanes plus the current COU result (plane
//      modes, whose four registers hold the block base, 2C, B and C);
//   3: the current COU result in all four lanes (DC modes);
//   4: the row last presented, again (chroma DC, while the COU works on
//      the partial sums of a later 4x4 sub-block).
// COU results are clipped to 0..255 (H.264 Clip1). The row and its
// position are held, with out_valid, until take; ready tells the
// controller that a commit in this cycle is accepted (the register is empty
// or is emptied in this cycle). The staging lanes and the hold-until-taken
// handshake are this design's own.
module output_gen
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stage_we,
  input  logic [1:0]  stage_lane,
  input  cou_t        f,
  input  reg_t        r [4],
  input  pix_t        direct_row [4],
  input  logic        commit,
  input  logic [2:0]  commit_src,
  input  logic [1:0]  pos_plane,
  input  logic [3:0]  pos_y,
  input  logic [1:0]  pos_col4,
  input  logic        take,
  output pix_t        out_row [4],
  output logic        out_valid,
  output logic [1:0]  out_plane,
  output logic [3:0]  out_y,
  output logic [1:0]  out_col4,
  output logic        ready
);

  pix_t stage [3];
  pix_t row_d [4];

  assign ready = !out_valid || take;

  always_comb begin
    case (commit_src)
      3'd1: begin
        for (int i = 0; i < 3; i++) row_d[i] = clip1(cou_t'(r[i]));
        row_d[3] = clip1(f);
      end
      3'd2: begin
        for (int i = 0; i < 3; i++) row_d[i] = stage[i];
        row_d[3] = clip1(f);
      end
      3'd3: for (int i = 0; i < 4; i++) row_d[i] = clip1(f);
      3'd4: row_d = out_row;
      default: row_d = direct_row;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) stage[i] <= '0;
    end else if (stage_we && stage_lane != 2'd3) begin
      stage[stage_lane] <= clip1(f);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 4; i++) out_row[i] <= '0;
      out_plane <= '0;
      out_y     <= '0;
      out_col4  <= '0;
    end else begin
      if (commit && ready) begin
        out_valid <= 1'b1;
        out_row   <= row_d;
        out_plane <= pos_plane;
        out_y     <= pos_y;
        out_col4  <= pos_col4;
      end else if (take) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule

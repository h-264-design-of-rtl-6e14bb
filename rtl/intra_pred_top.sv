// H.264 intra prediction circuit built around one shared common operations
// unit (COU).
//
// Every one of the 17 intra prediction modes (nine luma 4x4, four luma
// 16x16, four chroma 8x8) is computed with the single operation
// F(W,X,Y,Z,alpha) = (W+X+Y+Z+2)>>alpha of the COU, with a four-entry
// 15-bit register file for intermediate results. The blocks, as in the
// design: predictor memories for Y, Cb and Cr; the input data selector,
// which gathers the predictors P0..P32 and feeds the COU; the COU with its
// multiplier; the register file R0..R3; the output data generator, which
// gives four prediction values per row (OUT0..OUT3); the prediction
// controller; and the adder that adds the IDCT residuals and writes the
// reconstructed pixels back into the predictor memory.
//
// Use: with intra_busy low, pulse intra_start with intra_mode, and with
// blk_idx (luma 4x4 block 0..15 in raster order inside the macroblock) for
// modes 0..8 or chroma_cr (0 Cb, 1 Cr) for modes 13..16; mb_x and mb_y give
// the macroblock's position. A luma 4x4 job predicts one 4x4 block, a
// 16x16 job a whole macroblock, a chroma job one 8x8 block. Prediction rows
// come out in 4x4-block raster order on pred_row with pred_valid; each is
// paired with one IDCT row (idct_out with idct_res, one row of a 4x4
// block) and consumed in that cycle (idct_ready tells the IDCT its row was
// taken; an IDCT that pulses its row only when idct_ready is high never
// loses one). The sum appears on recon_row with recon_valid and is stored
// as predictor for the next blocks. Jobs of one macroblock must be issued
// in raster order of its 4x4 blocks, luma before or after chroma, and
// macroblocks in raster order over the picture.
//
// Timing: no set-up for horizontal, vertical and luma 4x4 directional
// modes; 2n-2 cycles of DC set-up over n >= 2 groups of four predictors
// (1 for one group, 2 for a chroma block); 37 (16x16) or 21 (chroma)
// cycles of plane set-up; then one row per cycle (H, V, DC) or per four
// cycles (luma 4x4 directional, plane; plane adds one or two cycles at
// each later 4x4 block). Horizontal, vertical and DC meet the design's
// published cycle counts; the luma 4x4 directional and plane modes are
// slower, see the README.
module intra_pred_top
  import intra_pkg::*;
#(
  parameter int IMG_W = 640,
  parameter int IMG_H = 480,
  localparam int MBW   = IMG_W / 16,
  localparam int MBH   = IMG_H / 16,
  localparam int MBX_W = $clog2(MBW),
  localparam int MBY_W = $clog2(MBH)
)(
  input  logic             clk,
  input  logic             rst_n,
  // from the VLD / decoder control
  input  logic             intra_start,
  input  logic [4:0]       intra_mode,
  input  logic [3:0]       blk_idx,
  input  logic             chroma_cr,
  input  logic [MBX_W-1:0] mb_x,
  input  logic [MBY_W-1:0] mb_y,
  output logic             intra_busy,
  output logic             intra_done,
  // from the IDCT
  input  logic             idct_out,
  input  res_t             idct_res [4],
  output logic             idct_ready,
  // prediction rows OUT0..OUT3
  output pix_t             pred_row [4],
  output logic             pred_valid,
  output logic             pred_stall,
  // reconstructed rows
  output pix_t             recon_row [4],
  output logic             recon_valid,
  output logic [1:0]       recon_plane,
  output logic [3:0]       recon_y,
  output logic [1:0]       recon_col4
);

  mode_e      mode;
  logic [3:0] blk;
  logic [1:0] plane;
  phase_e     phase;
  logic [5:0] step, row, pre_len;
  logic [2:0] k;
  logic       rf_we, stage_we, commit, og_ready, take, busy;
  logic [1:0] rf_waddr, stage_lane, commit_col4;
  logic [2:0] commit_src;
  logic [3:0] commit_y;

  reg_t       r [4];
  cou_op_t    op;
  cou_t       f;
  pix_t       p [NP];
  pix_t       direct_row [4];
  logic       avail_top, avail_left;

  // predictor memories
  pix_t y_top [20], y_left [16], y_corner, y_cur [16][16];
  pix_t b_top [12], b_left [8],  b_corner, b_cur [8][8];
  pix_t c_top [12], c_left [8],  c_corner, c_cur [8][8];
  pix_t s_top [20], s_left [16], s_corner, s_cur [16][16];
  logic we_y, we_b, we_c;

  // ---------------- prediction controller ----------------
  pred_controller u_ctrl (
    .clk, .rst_n,
    .start      (intra_start),
    .mode_in    (mode_e'(intra_mode)),
    .blk_in     (blk_idx),
    .cr_in      (chroma_cr),
    .pre_len,
    .og_ready,
    .mode, .blk, .plane, .phase, .step, .row, .k,
    .rf_we, .rf_waddr, .stage_we, .stage_lane,
    .commit, .commit_src, .commit_y, .commit_col4,
    .busy,
    .done       (intra_done),
    .stall      (pred_stall)
  );

  // ---------------- SRAMs for Y, Cb, Cr ----------------
  assign we_y = take && (recon_plane == 2'd0);
  assign we_b = take && (recon_plane == 2'd1);
  assign we_c = take && (recon_plane == 2'd2);

  nbr_sram #(.MB_N(16), .IMG_W(IMG_W)) u_sram_y (
    .clk, .rst_n, .mb_x (mb_x),
    .wr_en (we_y), .wr_row (recon_y), .wr_col4 (recon_col4), .wr_pix (recon_row),
    .top_line (y_top), .left_col (y_left), .corner (y_corner), .cur (y_cur)
  );

  nbr_sram #(.MB_N(8), .IMG_W(IMG_W/2)) u_sram_cb (
    .clk, .rst_n, .mb_x (mb_x),
    .wr_en (we_b), .wr_row (recon_y), .wr_col4 (recon_col4), .wr_pix (recon_row),
    .top_line (b_top), .left_col (b_left), .corner (b_corner), .cur (b_cur)
  );

  nbr_sram #(.MB_N(8), .IMG_W(IMG_W/2)) u_sram_cr (
    .clk, .rst_n, .mb_x (mb_x),
    .wr_en (we_c), .wr_row (recon_y), .wr_col4 (recon_col4), .wr_pix (recon_row),
    .top_line (c_top), .left_col (c_left), .corner (c_corner), .cur (c_cur)
  );

  // plane multiplexer in front of the input data selector
  always_comb begin
    for (int i = 0; i < 20; i++) s_top[i] = '0;
    for (int i = 0; i < 16; i++) s_left[i] = '0;
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) s_cur[i][j] = '0;
    s_corner = '0;
    case (plane)
      2'd1: begin
        for (int i = 0; i < 12; i++) s_top[i] = b_top[i];
        for (int i = 0; i < 8; i++) s_left[i] = b_left[i];
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) s_cur[i][j] = b_cur[i][j];
        s_corner = b_corner;
      end
      2'd2: begin
        for (int i = 0; i < 12; i++) s_top[i] = c_top[i];
        for (int i = 0; i < 8; i++) s_left[i] = c_left[i];
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) s_cur[i][j] = c_cur[i][j];
        s_corner = c_corner;
      end
      default: begin
        s_top = y_top; s_left = y_left; s_cur = y_cur; s_corner = y_corner;
      end
    endcase
  end

  // ---------------- input data selector ----------------
  input_selector u_sel (
    .mode, .blk_idx (blk),
    .mb_left_edge  (mb_x == '0),
    .mb_top_edge   (mb_y == '0),
    .mb_right_edge (int'(mb_x) == MBW-1),
    .top_line (s_top), .left_col (s_left), .corner (s_corner), .cur (s_cur),
    .r, .phase, .step, .row, .k,
    .p, .op, .direct_row, .pre_len, .avail_top, .avail_left
  );

  // ---------------- COU and register file ----------------
  cou u_cou (
    .w (op.w), .x (op.x), .y (op.y), .z (op.z),
    .alpha (op.alpha), .mul_en (op.mul_en), .coef (op.coef),
    .f
  );

  reg_file u_rf (
    .clk, .rst_n, .we (rf_we), .waddr (rf_waddr), .wdata (f), .r
  );

  // ---------------- output data generator ----------------
  output_gen u_og (
    .clk, .rst_n,
    .stage_we, .stage_lane, .f, .r, .direct_row,
    .commit, .commit_src,
    .pos_plane (plane), .pos_y (commit_y), .pos_col4 (commit_col4),
    .take,
    .out_row (pred_row), .out_valid (pred_valid),
    .out_plane (recon_plane), .out_y (recon_y), .out_col4 (recon_col4),
    .ready (og_ready)
  );

  // ---------------- reconstruction ----------------
  assign take        = pred_valid && idct_out;
  assign idct_ready  = pred_valid;
  assign recon_valid = take;

  recon_adder u_add (.pred (pred_row), .res (idct_res), .recon (recon_row));

  assign intra_busy = busy || pred_valid;

  // A job may only be started while the circuit is idle, and an IDCT row
  // must stay presented until it is taken.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    intra_start |-> !intra_busy);
  a_idct_hold: assert property (@(posedge clk) disable iff (!rst_n)
    idct_out && !idct_ready |=> idct_out);

endmodule

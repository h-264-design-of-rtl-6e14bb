// One picture of IMGW x IMGH pixels through an intra prediction circuit
// whose line memories are sized for it, with the design's IDCT timing
// (first residual row 40 cycles after intra_start, then one every 4 cycles).
module intra_workload_run
  import intra_pkg::*;
#(
  parameter int IMGW  = 640,
  parameter int IMGH  = 480,
  parameter int MBX_W = 6,
  parameter int MBY_W = 5
)(
  input logic clk
);
  logic rst_n, intra_start, intra_busy, intra_done, chroma_cr;
  logic [4:0] intra_mode;
  logic [3:0] blk_idx, recon_y;
  logic [MBX_W-1:0] mb_x;
  logic [MBY_W-1:0] mb_y;
  logic [1:0] recon_plane, recon_col4;
  logic idct_out, idct_ready, pred_valid, pred_stall, recon_valid;
  res_t idct_res [4];
  pix_t pred_row [4], recon_row [4];

  intra_pred_top #(.IMG_W(IMGW), .IMG_H(IMGH)) dut (.*);

  intra_tb_driver #(.IMG_W(IMGW), .IMG_H(IMGH), .INIT_DELAY(40), .ROW_GAP(4),
                    .MBX_W(MBX_W), .MBY_W(MBY_W), .STANDALONE(1'b0)) drv (.*);
endmodule

// Full-size test: one complete 640x480 picture (1200 macroblocks, luma and
// both chroma planes) through the intra prediction circuit at its default
// parameters, with the IDCT timing of the design's interface: the first
// residual row 40 cycles after intra_start, then one row every 4 cycles.
module tb_intra_pred_full;
  import intra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, intra_start, intra_busy, intra_done, chroma_cr;
  logic [4:0] intra_mode;
  logic [3:0] blk_idx, recon_y;
  logic [5:0] mb_x;
  logic [4:0] mb_y;
  logic [1:0] recon_plane, recon_col4;
  logic idct_out, idct_ready, pred_valid, pred_stall, recon_valid;
  res_t idct_res [4];
  pix_t pred_row [4], recon_row [4];

  intra_pred_top dut (.*);

  intra_tb_driver #(.IMG_W(640), .IMG_H(480), .INIT_DELAY(40), .ROW_GAP(4),
                    .MBX_W(6), .MBY_W(5)) drv (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule

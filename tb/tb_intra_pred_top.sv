// End-to-end test of the intra prediction circuit on a 64x64 picture
// (16 macroblocks, every mode and availability case), with the IDCT rows
// spaced at random so that both sides of the row handshake wait.
module tb_intra_pred_top;
  import intra_pkg::*;

  localparam int W = 64;
  localparam int H = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, intra_start, intra_busy, intra_done, chroma_cr;
  logic [4:0] intra_mode;
  logic [3:0] blk_idx, recon_y;
  logic [1:0] mb_x, mb_y, recon_plane, recon_col4;
  logic idct_out, idct_ready, pred_valid, pred_stall, recon_valid;
  res_t idct_res [4];
  pix_t pred_row [4], recon_row [4];

  intra_pred_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  intra_tb_driver #(.IMG_W(W), .IMG_H(H), .INIT_DELAY(3), .ROW_GAP(0),
                    .MBX_W(2), .MBY_W(2)) drv (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule

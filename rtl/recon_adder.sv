// Reconstruction adder.
//
// Adds the four prediction values OUT0..OUT3 to the four IDCT residuals
// IDCT_OUT0..IDCT_OUT3 of the same row and clips each sum to 0..255,
// giving the reconstructed pixels that go to the deblocking filter and,
// where they are predictors of later blocks, to the predictor memory.
// Combinational. The clip and the 10-bit signed residual are this
// design's own choice (H.264 clips reconstructed samples the same way).
module recon_adder
  import intra_pkg::*;
(
  input  pix_t pred [4],
  input  res_t res  [4],
  output pix_t recon [4]
);

  always_comb begin
    for (int i = 0; i < 4; i++)
      recon[i] = clip1(cou_t'({1'b0, pred[i]}) + cou_t'(res[i]));
  end

endmodule

// Test of the reconstruction adder: prediction plus residual, clipped to
// 0..255, on random rows including large residuals.
module tb_recon_adder;
  import intra_pkg::*;

  pix_t pred [4], recon [4];
  res_t res [4];
  int checks = 0, failures = 0, clipped = 0;

  recon_adder dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e [4];
      for (int i = 0; i < 4; i++) begin
        pred[i] = 8'($urandom_range(0, 255));
        res[i]  = res_t'($signed($urandom_range(0, 1000)) - 500);
        e[i] = int'(pred[i]) + int'(res[i]);
        if (e[i] < 0 || e[i] > 255) clipped++;
        e[i] = e[i] < 0 ? 0 : (e[i] > 255 ? 255 : e[i]);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(recon[i]) != e[i]) begin
          failures++;
          $display("FAIL lane %0d: %0d + %0d -> %0d", i, pred[i], res[i], recon[i]);
        end
      end
    end
    checks++;
    if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

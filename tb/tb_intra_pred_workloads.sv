// Picture-size workloads: a 640x480 and a 1280x1024 picture, each through
// a circuit with line memories of the picture's width, run side by side.
// Every row is checked against the reference model. The frame cycle counts
// are printed next to the budget for 61 frames/s at 100.9 MHz
// (100.9e6 / 61 = 1,654,098 cycles per frame) for information.
module tb_intra_pred_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  intra_workload_run #(.IMGW(640),  .IMGH(480),  .MBX_W(6), .MBY_W(5)) vga  (.clk);
  intra_workload_run #(.IMGW(1280), .IMGH(1024), .MBX_W(7), .MBY_W(6)) sxga (.clk);

  initial begin
    wait (vga.drv.finished && sxga.drv.finished);
    $display("640x480 frame: %0d cycles; 1280x1024 frame: %0d cycles; budget at 61 frames/s: 1654098",
             vga.drv.cycle, sxga.drv.cycle);
    $display("TB_RESULT checks=%0d failures=%0d",
             vga.drv.checks + sxga.drv.checks, vga.drv.failures + sxga.drv.failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             vga.drv.checks + sxga.drv.checks, vga.drv.failures + sxga.drv.failures + 1);
    $finish;
  end
endmodule

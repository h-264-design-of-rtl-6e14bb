// Test of the predictor memory on a 64-pixel-wide luma plane: macroblocks
// are written row by row in 4x4-block raster order over three macroblock
// rows; after every write the current-block array, and at each new
// macroblock the line above (including the four pixels to the right), the
// left column and the corner are compared with a model picture.
module tb_nbr_sram;
  import intra_pkg::*;

  localparam int N = 16;
  localparam int W = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, wr_en;
  logic [1:0] mb_x;
  logic [3:0] wr_row;
  logic [1:0] wr_col4;
  pix_t wr_pix [4];
  pix_t top_line [N+4], left_col [N], corner, cur [N][N];

  int pic [48][W];
  int checks = 0, failures = 0;

  nbr_sram #(.MB_N(N), .IMG_W(W)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; mb_x = '0; wr_row = '0; wr_col4 = '0;
    for (int i = 0; i < 4; i++) wr_pix[i] = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int my = 0; my < 3; my++) for (int mx = 0; mx < W/N; mx++) begin
      mb_x = 2'(mx);
      #1;
      // neighbours of the new macroblock
      if (my > 0) for (int i = 0; i < N + 4; i++)
        if (16*mx + i < W) chk(int'(top_line[i]) == pic[16*my-1][16*mx+i], $sformatf("line mb(%0d,%0d) %0d", mx, my, i));
      if (mx > 0) for (int j = 0; j < N; j++)
        chk(int'(left_col[j]) == pic[16*my+j][16*mx-1], $sformatf("left mb(%0d,%0d) %0d", mx, my, j));
      if (mx > 0 && my > 0) chk(int'(corner) == pic[16*my-1][16*mx-1], "corner");
      for (int b = 0; b < 16; b++) for (int r = 0; r < 4; r++) begin
        wr_en = 1'b1; wr_row = 4'(4*(b/4) + r); wr_col4 = 2'(b%4);
        for (int i = 0; i < 4; i++) begin
          wr_pix[i] = 8'($urandom_range(0, 255));
          pic[16*my + 4*(b/4) + r][16*mx + 4*(b%4) + i] = int'(wr_pix[i]);
        end
        @(negedge clk);
        wr_en = 1'b0;
        for (int i = 0; i < 4; i++)
          chk(int'(cur[4*(b/4)+r][4*(b%4)+i]) == pic[16*my + 4*(b/4) + r][16*mx + 4*(b%4) + i], "cur");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

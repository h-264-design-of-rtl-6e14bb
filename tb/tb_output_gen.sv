// Test of the output data generator: rows from the five sources (direct
// row; R0..R2 plus COU; staging lanes plus COU; COU in every lane; the last
// row again) with clipping of COU
// values, the position that travels with the row, and holding a row until
// it is taken while refusing (ready low) a second one.
module tb_output_gen;
  import intra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, stage_we, commit, take, out_valid, ready;
  logic [2:0] commit_src;
  logic [1:0] stage_lane, pos_plane, pos_col4, out_plane, out_col4;
  logic [3:0] pos_y, out_y;
  cou_t f;
  reg_t r [4];
  pix_t direct_row [4], out_row [4];
  int checks = 0, failures = 0;
  int exp_row [4];

  output_gen dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int clipi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    rst_n = 1'b0; stage_we = 0; commit = 0; take = 0; stage_lane = 0; commit_src = 0;
    pos_plane = 0; pos_col4 = 0; pos_y = 0; f = '0;
    for (int i = 0; i < 4; i++) begin r[i] = '0; direct_row[i] = '0; end
    @(negedge clk); rst_n = 1'b1;
    #1 chk(!out_valid && ready, "empty after reset");
    for (int n = 0; n < 500; n++) begin
      int src;
      src = $urandom_range(0, 4);
      // fill the staging lanes for a plane row
      if (src == 2) for (int l = 0; l < 3; l++) begin
        int v;
        v = $signed($urandom_range(0, 400)) - 70;
        stage_we = 1'b1; stage_lane = 2'(l); f = cou_t'(v);
        exp_row[l] = clipi(v);
        @(negedge clk);
      end
      stage_we = 1'b0;
      for (int i = 0; i < 4; i++) begin
        direct_row[i] = 8'($urandom_range(0, 255));
        r[i] = reg_t'($urandom_range(0, 255));
      end
      f = cou_t'($signed($urandom_range(0, 400)) - 70);
      case (src)
        0: for (int i = 0; i < 4; i++) exp_row[i] = int'(direct_row[i]);
        1: begin for (int i = 0; i < 3; i++) exp_row[i] = int'(r[i]); exp_row[3] = clipi(int'(f)); end
        3: for (int i = 0; i < 4; i++) exp_row[i] = clipi(int'(f));
        4: ;  // the row last presented
        default: exp_row[3] = clipi(int'(f));
      endcase
      commit = 1'b1; commit_src = 3'(src);
      pos_plane = 2'($urandom_range(0, 2)); pos_y = 4'($urandom); pos_col4 = 2'($urandom);
      #1 chk(ready, "ready when empty");
      @(negedge clk);
      commit = 1'b0;
      #1;
      chk(out_valid, "valid after commit");
      chk(out_plane == pos_plane && out_y == pos_y && out_col4 == pos_col4, "position");
      for (int i = 0; i < 4; i++) chk(int'(out_row[i]) == exp_row[i], $sformatf("lane %0d src %0d", i, src));
      // a held row is kept, and a second commit is refused, until taken
      commit = 1'b1; commit_src = 3'd0; direct_row[0] = ~out_row[0];
      #1 chk(!ready, "not ready while full");
      @(negedge clk);
      commit = 1'b0;
      #1;
      chk(out_valid && int'(out_row[0]) == exp_row[0], "row held");
      take = 1'b1;
      #1 chk(ready, "ready while taken");
      @(negedge clk);
      take = 1'b0;
      #1 chk(!out_valid, "empty after take");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

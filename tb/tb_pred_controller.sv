// Test of the prediction controller. For every mode a job is run twice,
// once with the output data generator always ready and once with it ready
// at random. Checked: register writes during set-up (one per cycle, pre_len
// cycles, DC destination registers), the R0..R2 / staging writes inside a
// row and the chroma DC writes of R0 and R1 during repeated rows, the
// commit source, order and position of every row, that a commit only
// happens when ready and a stall only when not, the done pulse, and the
// exact number of busy cycles when never stalled.
module tb_pred_controller;
  import intra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, cr_in, og_ready;
  mode_e mode_in, mode;
  logic [3:0] blk_in, blk, commit_y;
  logic [5:0] pre_len, step, row;
  logic [1:0] plane, rf_waddr, stage_lane, commit_col4;
  logic [2:0] commit_src;
  phase_e phase;
  logic [2:0] k;
  logic rf_we, stage_we, commit, busy, done, stall;
  int checks = 0, failures = 0, stalls = 0;

  pred_controller dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(int m, int b, int pl, bit rnd);
    int nrows, rc, commits, busy_cyc, pre_cyc, exp_busy, npre, dones, row_we, ntr, tw;
    bit pln;
    pln = (m == 12 || m == 16);
    // plane: cycles that move the sub-block base (one per new 4x4 column,
    // two per new row of sub-blocks)
    ntr = (m == 12) ? 12 + 2*3 : (m == 16) ? 2 + 2*1 : 0;
    nrows = (m <= 8) ? 4 : (m >= 13) ? 16 : 64;
    rc = (m >= 3 && m <= 8 || pln) ? 4 : 1;
    npre = (m == 2 || m == 11 || m == 15) ? pl : (m == 12) ? 37 : (m == 16) ? 21 : 0;
    pre_len = 6'(npre);
    exp_busy = ((npre == 0) ? ((m == 2 || m == 11 || m == 15) ? 1 : 0) : npre) + nrows * rc + ntr;
    start = 1'b1; mode_in = mode_e'(m); blk_in = 4'(b); cr_in = 1'b1;
    @(negedge clk);
    start = 1'b0;
    commits = 0; busy_cyc = 0; pre_cyc = 0; dones = 0; row_we = 0; tw = 0;
    while (busy) begin
      int sb, ey, ec;
      og_ready = rnd ? 1'($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      busy_cyc++;
      chk(mode == mode_e'(m), "mode latched");
      chk(plane == ((m >= 13) ? 2'd2 : 2'd0), "plane");
      if (phase == PH_PRE && npre > 0) begin
        pre_cyc++;
        chk(rf_we, "set-up writes a register");
        if (m == 2 || m == 11 || m == 15)
          chk(rf_waddr == (step[0] ? 2'd1 : 2'd0), "DC destination");
        if (m == 12 || m == 16) begin
          int hf, s, ed;
          // H terms (first into R0, then R1 / R0 += (i+1)*R1), B -> R2,
          // V terms, C -> R3, A -> R0 in two steps, 2C -> R1, first
          // sub-block base -> R0 in two steps
          hf = (m == 12) ? 8 : 4; s = int'(step);
          if (s == 2*hf - 1) ed = 2;
          else if (s == 4*hf - 1) ed = 3;
          else if (s == 4*hf + 2) ed = 1;
          else if (s >= 4*hf) ed = 0;
          else ed = ((s % (2*hf)) % 2 == 1) ? 1 : 0;
          chk(int'(rf_waddr) == ed, $sformatf("plane destination step %0d", s));
        end
      end
      if (phase == PH_ROW && rc == 4 && !pln && k < 3) begin
        chk(rf_we && rf_waddr == k[1:0], "directional writes R[k]"); row_we++;
      end
      // chroma DC with both neighbours: rows 1 and 2 write the sums of
      // sub-block 3 into R0 and R1
      if (phase == PH_ROW && m == 15 && npre == 2 && og_ready && (commits == 1 || commits == 2))
        chk(rf_we && rf_waddr == ((commits == 1) ? 2'd0 : 2'd1), "chroma DC in-row register write");
      else if (phase == PH_ROW && rc == 1)
        chk(!rf_we, "no register write in a one-cycle row");
      if (phase == PH_ROW && pln) begin
        int nt, sbi;
        sbi = commits / 4;
        nt = (commits % 4 == 0 && sbi != 0) ? ((sbi % ((m == 12) ? 4 : 2) == 0) ? 2 : 1) : 0;
        if (int'(k) < nt) begin
          chk(rf_we && rf_waddr == 2'd0 && !stage_we && !commit && !stall, "plane base move writes R0"); tw++;
        end else if (int'(k) < nt + 3) begin
          chk(stage_we && int'(stage_lane) == int'(k) - nt, "plane staging lane"); row_we++;
        end
      end
      chk(!(commit && !og_ready), "commit only when ready");
      chk(!(stall && og_ready), "stall only when not ready");
      if (stall) stalls++;
      if (commit) begin
        sb = commits / 4;
        if (m <= 8) begin ey = 4*(b/4) + commits; ec = b % 4; end
        else if (m >= 13) begin ey = 4*(sb/2) + commits % 4; ec = sb % 2; end
        else begin ey = 4*(sb/4) + commits % 4; ec = sb % 4; end
        chk(int'(commit_y) == ey && int'(commit_col4) == ec, $sformatf("position m%0d row %0d", m, commits));
        chk(int'(commit_src) == (pln ? 2 : (rc == 4) ? 1 :
                                 (m == 15 && npre == 2 && commits >= 1 && commits <= 3) ? 4 :
                                 (m == 2 || m == 11 || m == 15) ? 3 : 0),
            $sformatf("commit source m%0d row %0d", m, commits));
        commits++;
      end
      @(negedge clk);
      if (done) dones++;
    end
    chk(commits == nrows, $sformatf("rows of mode %0d: %0d", m, commits));
    chk(dones == 1, "one done pulse");
    chk(pre_cyc == npre, $sformatf("set-up cycles mode %0d: %0d", m, pre_cyc));
    if (rc > 1) chk(row_we == 3 * nrows, "in-row writes");
    if (pln && !rnd) chk(tw == ntr, $sformatf("base moves %0d", tw));
    if (!rnd) chk(busy_cyc == exp_busy, $sformatf("busy cycles mode %0d: %0d exp %0d", m, busy_cyc, exp_busy));
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mode_in = M4_V; blk_in = '0; cr_in = 1'b0; og_ready = 1'b1; pre_len = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int m = 0; m < 17; m++) begin
      int pl;
      pl = (m == 11) ? 14 : (m == 2 || m == 15) ? 2 : 0;
      run(m, $urandom_range(0, 15), pl, 1'b0);
      run(m, $urandom_range(0, 15), (pl == 0 || m == 15) ? 0 : 1, 1'b1);
      if (m == 15) run(m, $urandom_range(0, 15), pl, 1'b1);
    end
    chk(stalls > 0, "a stall occurred");
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

// Test of the input data selector. Random neighbour memories are applied;
// for every luma 4x4 block position, every mode and every combination of
// picture edges the gathered predictors P0..P32 are compared with the
// expected ones (including above-right substitution). The COU operations
// the selector routes are then executed by a model of F and a model
// register file, following the controller's schedule, and the resulting
// prediction of every pixel is compared with the H.264 equations. Besides
// random neighbours, the steepest plane gradients are applied, which drive
// the 15-bit plane block base to its extremes.
module tb_input_selector;
  import intra_pkg::*;

  mode_e mode;
  logic [3:0] blk_idx;
  logic mb_left_edge, mb_top_edge, mb_right_edge;
  pix_t top_line [20], left_col [16], corner, cur [16][16];
  reg_t r [4];
  phase_e phase;
  logic [5:0] step, row, pre_len;
  logic [2:0] k;
  pix_t p [NP], direct_row [4];
  cou_op_t op;
  logic avail_top, avail_left;

  int checks = 0, failures = 0;
  int ep [NP];
  int t [17], l [17];  // t[0]/l[0] corner, t[1+i] above, l[1+j] left
  int expb [16][16];

  input_selector dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  function automatic longint runf();
    longint s;
    s = longint'(op.w) + (op.mul_en ? longint'(op.x) * longint'(op.coef) : longint'(op.x))
        + longint'(op.y) + longint'(op.z) + 2;
    return s >>> op.alpha;
  endfunction

  function automatic int clipi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // H.264 reference on t[] and l[]
  function automatic void reference(int m, bit at, bit al);
    int n, hf, s, st, sl, z, h, v, a, b, c;
    n = (m <= 8) ? 4 : (m >= 13) ? 8 : 16;
    hf = n / 2;
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      case (m)
        0, 10, 14: expb[y][x] = t[1+x];
        1, 9, 13:  expb[y][x] = l[1+y];
        3: if (x == 3 && y == 3) expb[y][x] = (t[7] + 3*t[8] + 2) >> 2;
           else expb[y][x] = (t[1+x+y] + 2*t[2+x+y] + t[3+x+y] + 2) >> 2;
        4: if (x > y)      expb[y][x] = (t[x-y-1] + 2*t[x-y] + t[x-y+1] + 2) >> 2;
           else if (x < y) expb[y][x] = (l[y-x-1] + 2*l[y-x] + l[y-x+1] + 2) >> 2;
           else            expb[y][x] = (t[1] + 2*t[0] + l[1] + 2) >> 2;
        5: begin
          z = 2*x - y;
          if (z >= 0 && z % 2 == 0) expb[y][x] = (t[x-(y>>1)] + t[x-(y>>1)+1] + 1) >> 1;
          else if (z >= 0) expb[y][x] = (t[x-(y>>1)-1] + 2*t[x-(y>>1)] + t[x-(y>>1)+1] + 2) >> 2;
          else if (z == -1) expb[y][x] = (l[1] + 2*t[0] + t[1] + 2) >> 2;
          else expb[y][x] = (l[y] + 2*l[y-1] + l[y-2] + 2) >> 2;
        end
        6: begin
          z = 2*y - x;
          if (z >= 0 && z % 2 == 0) expb[y][x] = (l[y-(x>>1)] + l[y-(x>>1)+1] + 1) >> 1;
          else if (z >= 0) expb[y][x] = (l[y-(x>>1)-1] + 2*l[y-(x>>1)] + l[y-(x>>1)+1] + 2) >> 2;
          else if (z == -1) expb[y][x] = (l[1] + 2*t[0] + t[1] + 2) >> 2;
          else expb[y][x] = (t[x] + 2*t[x-1] + t[x-2] + 2) >> 2;
        end
        7: if (y % 2 == 0) expb[y][x] = (t[1+x+(y>>1)] + t[2+x+(y>>1)] + 1) >> 1;
           else expb[y][x] = (t[1+x+(y>>1)] + 2*t[2+x+(y>>1)] + t[3+x+(y>>1)] + 2) >> 2;
        8: begin
          z = x + 2*y;
          if (z < 5 && z % 2 == 0) expb[y][x] = (l[1+y+(x>>1)] + l[2+y+(x>>1)] + 1) >> 1;
          else if (z < 5) expb[y][x] = (l[1+y+(x>>1)] + 2*l[2+y+(x>>1)] + l[3+y+(x>>1)] + 2) >> 2;
          else if (z == 5) expb[y][x] = (l[3] + 3*l[4] + 2) >> 2;
          else expb[y][x] = l[4];
        end
        2, 11: begin
          s = 0;
          for (int i = 0; i < n; i++) s += (at ? t[1+i] : 0) + (al ? l[1+i] : 0);
          if (at && al) s = (s + n) >> ((m == 2) ? 3 : 5);
          else if (at || al) s = (s + n/2) >> ((m == 2) ? 2 : 4);
          else s = 128;
          expb[y][x] = s;
        end
        15: begin
          int bx, by;
          bx = x / 4; by = y / 4; st = 0; sl = 0;
          for (int i = 0; i < 4; i++) begin st += t[1+4*bx+i]; sl += l[1+4*by+i]; end
          if (bx == by) s = (at && al) ? (st + sl + 4) >> 3 : at ? (st + 2) >> 2 : al ? (sl + 2) >> 2 : 128;
          else if (bx == 1) s = at ? (st + 2) >> 2 : al ? (sl + 2) >> 2 : 128;
          else s = al ? (sl + 2) >> 2 : at ? (st + 2) >> 2 : 128;
          expb[y][x] = s;
        end
        default: begin
          h = 0; v = 0;
          for (int i = 0; i < hf; i++) begin
            h += (i+1) * (t[1+hf+i] - t[hf-1-i]);
            v += (i+1) * (l[1+hf+i] - l[hf-1-i]);
          end
          a = 16 * (l[n] + t[n]);
          b = (((n == 16) ? 5 : 34) * h + 32) >>> 6;
          c = (((n == 16) ? 5 : 34) * v + 32) >>> 6;
          expb[y][x] = clipi((a + b*(x - (hf-1)) + c*(y - (hf-1)) + 16) >>> 5);
        end
      endcase
    end
  endfunction

  // Runs the set-up steps (register destinations as the controller
  // assigns them) and the rows, and compares every predicted pixel.
  task automatic run_mode(int m);
    int n, nrows, rc, nt, sb, sbx, sby, ry, x0, hf, val, rr [4];
    n = (m <= 8) ? 4 : (m >= 13) ? 8 : 16;
    hf = n / 2;
    nrows = (m <= 8) ? 4 : (m >= 13) ? 16 : 64;
    rc = (m >= 3 && m <= 8 || m == 12 || m == 16) ? 4 : 1;
    mode = mode_e'(m);
    for (int i = 0; i < 4; i++) rr[i] = 0;
    for (int ri = 0; ri < nrows; ri++) begin
      row = 6'(ri);
      sb = ri / 4;
      sbx = (m <= 8) ? 0 : sb % (n/4);
      sby = (m <= 8) ? 0 : sb / (n/4);
      ry = 4*sby + ri % 4; x0 = 4*sbx;
      if (ri == 0) begin
        phase = PH_PRE; k = '0;
        #1;
        for (int s = 0; s < int'(pre_len); s++) begin
          int d;
          step = 6'(s);
          for (int i = 0; i < 4; i++) r[i] = reg_t'(rr[i]);
          #1;
          val = int'(runf());
          if (m == 12 || m == 16) begin
            if (s == 2*hf-1) d = 2; else if (s == 4*hf-1) d = 3; else if (s == 4*hf+2) d = 1;
            else if (s >= 4*hf) d = 0;
            else if (s < 2*hf) d = (s % 2 == 1) ? 1 : 0; else d = ((s - 2*hf) % 2 == 1) ? 1 : 0;
          end else d = (s % 2 == 1) ? 1 : 0;
          rr[d] = int'(reg_t'(val));
        end
      end
      phase = PH_ROW; step = '0;
      // plane: the first row of each later 4x4 sub-block first moves the
      // sub-block base in R0 (one cycle, two at a new row of sub-blocks)
      nt = 0;
      if (rc == 4 && (m == 12 || m == 16) && ri % 4 == 0 && sb != 0) nt = (sbx == 0) ? 2 : 1;
      for (int kk = 0; kk < rc + nt; kk++) begin
        k = 3'(kk);
        for (int i = 0; i < 4; i++) r[i] = reg_t'(rr[i]);
        #1;
        val = int'(runf());
        if (m == 15 && pre_len == 6'd2 && (ri == 1 || ri == 2)) begin
          // repeated rows of sub-block 0: the COU forms the sums of
          // sub-block 3 (into R0, then R1) and the row is not checked here
          rr[ri - 1] = int'(reg_t'(val));
        end else if (m == 15 && pre_len == 6'd2 && ri == 3) begin
          ;
        end else if (m == 2 || m == 11 || m == 15) begin
          chk(clipi(val) == expb[ry][x0], $sformatf("DC mode %0d row %0d: %0d vs %0d", m, ri, val, expb[ry][x0]));
        end else if (rc == 1) begin
          for (int i = 0; i < 4; i++)
            chk(int'(direct_row[i]) == expb[ry][x0+i], $sformatf("mode %0d row %0d lane %0d: %0d vs %0d", m, ri, i, direct_row[i], expb[ry][x0+i]));
        end else if (rc == 4 && m != 12 && m != 16) begin
          chk(val == expb[ry][kk], $sformatf("mode %0d blk %0d (%0d,%0d): %0d vs %0d", m, blk_idx, kk, ry, val, expb[ry][kk]));
          if (kk < 3) rr[kk] = val;
        end else begin
          if (kk < nt) rr[0] = int'(reg_t'(val));
          else chk(clipi(val) == expb[ry][x0+kk-nt], $sformatf("plane mode %0d (%0d,%0d): %0d vs %0d", m, x0+kk-nt, ry, clipi(val), expb[ry][x0+kk-nt]));
        end
      end
    end
  endtask

  initial begin
    phase = PH_IDLE; step = '0; row = '0; k = '0;
    for (int i = 0; i < 4; i++) r[i] = '0;
    for (int iter = 0; iter < 12; iter++) begin
      for (int i = 0; i < 20; i++) top_line[i] = 8'($urandom_range(0, 255));
      for (int i = 0; i < 16; i++) left_col[i] = 8'($urandom_range(0, 255));
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) cur[i][j] = 8'($urandom_range(0, 255));
      corner = 8'($urandom_range(0, 255));
      mb_left_edge = iter[0]; mb_top_edge = iter[1]; mb_right_edge = iter[2];
      if (iter >= 8) begin
        // steepest plane gradients (16x16 for iterations 8, 9; chroma for
        // 10, 11), rising with the largest A and falling with the largest
        // A: the extremes of the 15-bit block base in R0
        int t;
        bit rise;
        t = (iter < 10) ? 8 : 4; rise = (iter % 2 == 0);
        mb_left_edge = 1'b0; mb_top_edge = 1'b0;
        corner = rise ? 8'd0 : 8'd255;
        for (int i = 0; i < 2*t; i++) begin
          top_line[i] = rise ? ((i >= t) ? 8'd255 : 8'd0) : ((i < t - 1 || i == 2*t - 1) ? 8'd255 : 8'd0);
          left_col[i] = top_line[i];
        end
      end
      // luma 4x4, every block and mode
      for (int b = 0; b < 16; b++) for (int m = 0; m < 9; m++) begin
        int br, bc;
        bit at, al, atr;
        br = b / 4; bc = b % 4;
        blk_idx = 4'(b); mode = mode_e'(m); phase = PH_IDLE;
        at = (br > 0) || !mb_top_edge; al = (bc > 0) || !mb_left_edge;
        atr = (br == 0) ? (!mb_top_edge && (bc < 3 || !mb_right_edge)) : (bc < 3);
        for (int i = 0; i < NP; i++) ep[i] = 0;
        for (int i = 0; i < 8; i++) begin
          int ii;
          ii = (i < 4 || atr) ? i : 3;
          ep[i] = (br == 0) ? top_line[4*bc + ii] : (4*bc + ii < 16 ? cur[4*br-1][4*bc + ii] : 0);
        end
        for (int j = 0; j < 4; j++) ep[16+j] = (bc == 0) ? left_col[4*br + j] : cur[4*br + j][4*bc - 1];
        ep[32] = (br == 0 && bc == 0) ? corner : (br == 0) ? top_line[4*bc-1] : (bc == 0) ? left_col[4*br-1] : cur[4*br-1][4*bc-1];
        #1;
        for (int i = 0; i < NP; i++) if (i < 8 || (i >= 16 && i < 20) || i == 32)
          chk(int'(p[i]) == ep[i], $sformatf("P%0d of block %0d", i, b));
        chk(avail_top == at && avail_left == al, "availability");
        t[0] = ep[32]; l[0] = ep[32];
        for (int i = 0; i < 8; i++) t[1+i] = ep[i];
        for (int j = 0; j < 4; j++) l[1+j] = ep[16+j];
        // modes needing missing neighbours are not used by a conforming stream
        if ((m == 0 || m == 3 || m == 7) && !at) continue;
        if ((m == 1 || m == 8) && !al) continue;
        if ((m >= 4 && m <= 6) && !(at && al)) continue;
        reference(m, at, al);
        run_mode(m);
      end
      // 16x16 and chroma
      for (int m = 9; m < 17; m++) begin
        int n;
        bit at, al;
        n = (m >= 13) ? 8 : 16;
        at = !mb_top_edge; al = !mb_left_edge;
        blk_idx = '0; mode = mode_e'(m); phase = PH_IDLE;
        #1;
        for (int i = 0; i < n; i++) begin
          chk(p[i] == top_line[i] && p[16+i] == left_col[i], "P of 16x16 / chroma");
          t[1+i] = top_line[i]; l[1+i] = left_col[i];
        end
        chk(p[32] == corner, "corner");
        t[0] = corner; l[0] = corner;
        if ((m == 9 || m == 13) && !al) continue;
        if ((m == 10 || m == 14) && !at) continue;
        if ((m == 12 || m == 16) && !(at && al)) continue;
        reference(m, at, al);
        run_mode(m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

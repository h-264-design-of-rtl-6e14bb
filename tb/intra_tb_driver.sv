// Stimulus and reference model for the intra prediction circuit.
//
// Decodes a synthetic picture of IMG_W x IMG_H pixels macroblock by
// macroblock, in raster order. Even macroblocks use luma 4x4 prediction
// (sixteen jobs, one per 4x4 block), odd ones luma 16x16; each is followed
// by a chroma job for Cb and one for Cr. Modes rotate over those the
// neighbour availability allows, so every mode and every availability case
// of DC occurs. An IDCT model presents one row of random residuals after
// INIT_DELAY cycles and then one every ROW_GAP cycles (randomised when
// ROW_GAP is 0), holding a row until the circuit takes it.
//
// The reference prediction is computed straight from the H.264 equations
// on the testbench's own copy of the reconstructed picture (no use of the
// F operation), and every prediction row, reconstructed row, row position
// and set-up latency is compared. Counts of the mechanisms exercised
// (every mode, the DC availability cases, above-right substitution, both
// kinds of wait, clipping) are checked to be non-zero at the end.
module intra_tb_driver
  import intra_pkg::*;
#(
  parameter int IMG_W      = 64,
  parameter int IMG_H      = 64,
  parameter int INIT_DELAY = 40,
  parameter int ROW_GAP    = 0,
  parameter int MBX_W      = 2,
  parameter int MBY_W      = 2,
  parameter bit STANDALONE = 1'b1   // 0: only raise 'finished', the caller reports
)(
  input  logic             clk,
  output logic             rst_n,
  output logic             intra_start,
  output logic [4:0]       intra_mode,
  output logic [3:0]       blk_idx,
  output logic             chroma_cr,
  output logic [MBX_W-1:0] mb_x,
  output logic [MBY_W-1:0] mb_y,
  input  logic             intra_busy,
  input  logic             intra_done,
  output logic             idct_out,
  output res_t             idct_res [4],
  input  logic             idct_ready,
  input  pix_t             pred_row [4],
  input  logic             pred_valid,
  input  logic             pred_stall,
  input  pix_t             recon_row [4],
  input  logic             recon_valid,
  input  logic [1:0]       recon_plane,
  input  logic [3:0]       recon_y,
  input  logic [1:0]       recon_col4
);

  localparam int MBW = IMG_W / 16;
  localparam int MBH = IMG_H / 16;

  int pic   [3][IMG_H][IMG_W];   // reconstructed Y, Cb, Cr (chroma uses half size)
  int expb  [16][16];            // expected prediction of the current job
  int checks, failures;
  int mode_cnt [17];
  int dc_case  [4];              // none, top only, left only, both
  int tr_subst, idct_wait, pred_wait, clip_cnt, jobs;
  int rot16, rotc, rot4;
  longint cycle;
  bit     finished = 1'b0;

  always @(posedge clk) begin
    if (!finished) cycle <= cycle + 1;
    if (pred_stall) pred_wait <= pred_wait + 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // ---------------- reference: luma 4x4 ----------------
  function automatic void ref4x4(int m, int x0, int y0, bit at, bit al, bit atr);
    int t [9];  // t[0] = corner, t[1+i] = above pixel i
    int l [5];  // l[0] = corner, l[1+j] = left pixel j
    int s, z;
    for (int i = 0; i < 9; i++) t[i] = 0;
    for (int j = 0; j < 5; j++) l[j] = 0;
    if (at && al) begin t[0] = pic[0][y0-1][x0-1]; l[0] = t[0]; end
    if (at) for (int i = 0; i < 8; i++)
      t[1+i] = (i < 4 || atr) ? pic[0][y0-1][x0+i] : pic[0][y0-1][x0+3];
    if (al) for (int j = 0; j < 4; j++) l[1+j] = pic[0][y0+j][x0-1];
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
      case (m)
        0: expb[y][x] = t[1+x];
        1: expb[y][x] = l[1+y];
        2: begin
          s = 0;
          if (at && al) begin for (int i = 0; i < 4; i++) s += t[1+i] + l[1+i]; expb[y][x] = (s + 4) >> 3; end
          else if (at) begin for (int i = 0; i < 4; i++) s += t[1+i]; expb[y][x] = (s + 2) >> 2; end
          else if (al) begin for (int i = 0; i < 4; i++) s += l[1+i]; expb[y][x] = (s + 2) >> 2; end
          else expb[y][x] = 128;
        end
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
        default: begin
          z = x + 2*y;
          if (z < 5 && z % 2 == 0) expb[y][x] = (l[1+y+(x>>1)] + l[2+y+(x>>1)] + 1) >> 1;
          else if (z < 5) expb[y][x] = (l[1+y+(x>>1)] + 2*l[2+y+(x>>1)] + l[3+y+(x>>1)] + 2) >> 2;
          else if (z == 5) expb[y][x] = (l[3] + 3*l[4] + 2) >> 2;
          else expb[y][x] = l[4];
        end
      endcase
    end
  endfunction

  // ---------------- reference: 16x16 luma and 8x8 chroma ----------------
  function automatic void refbig(int m, int pl, int x0, int y0, bit at, bit al);
    int n, hf, t [17], l [17], s, h, v, a, b, c, st, sl;
    n = (pl == 0) ? 16 : 8;
    hf = n / 2;
    for (int i = 0; i < 17; i++) begin t[i] = 0; l[i] = 0; end
    if (at && al) begin t[0] = pic[pl][y0-1][x0-1]; l[0] = t[0]; end
    if (at) for (int i = 0; i < n; i++) t[1+i] = pic[pl][y0-1][x0+i];
    if (al) for (int j = 0; j < n; j++) l[1+j] = pic[pl][y0+j][x0-1];
    case (m)
      9, 13:  for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) expb[y][x] = l[1+y];
      10, 14: for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) expb[y][x] = t[1+x];
      11: begin
        s = 0;
        for (int i = 0; i < 16; i++) s += (at ? t[1+i] : 0) + (al ? l[1+i] : 0);
        if (at && al) s = (s + 16) >> 5;
        else if (at || al) s = (s + 8) >> 4;
        else s = 128;
        for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) expb[y][x] = s;
      end
      15: for (int by = 0; by < 2; by++) for (int bx = 0; bx < 2; bx++) begin
        st = 0; sl = 0;
        for (int i = 0; i < 4; i++) begin st += t[1+4*bx+i]; sl += l[1+4*by+i]; end
        if (bx == by) s = (at && al) ? (st + sl + 4) >> 3 : at ? (st + 2) >> 2 : al ? (sl + 2) >> 2 : 128;
        else if (bx == 1) s = at ? (st + 2) >> 2 : al ? (sl + 2) >> 2 : 128;
        else s = al ? (sl + 2) >> 2 : at ? (st + 2) >> 2 : 128;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) expb[4*by+y][4*bx+x] = s;
      end
      default: begin  // plane
        h = 0; v = 0;
        for (int i = 0; i < hf; i++) begin
          h += (i+1) * (t[1+hf+i] - t[hf-1-i]);
          v += (i+1) * (l[1+hf+i] - l[hf-1-i]);
        end
        a = 16 * (l[n] + t[n]);
        b = (((pl == 0) ? 5 : 34) * h + 32) >>> 6;
        c = (((pl == 0) ? 5 : 34) * v + 32) >>> 6;
        for (int y = 0; y < n; y++) for (int x = 0; x < n; x++)
          expb[y][x] = clip((a + b*(x - (hf-1)) + c*(y - (hf-1)) + 16) >>> 5);
      end
    endcase
  endfunction

  // ---------------- one prediction job ----------------
  task automatic run_job(int m, int blk, int cr, int mbx, int mby);
    int pl, n, nrows, x0, y0, sb, ry, rx, lat, pre, rc, ax, ay, bx, by;
    bit at, al, atr, first;
    pl = (m >= 13) ? 1 + cr : 0;
    n  = (m >= 13) ? 8 : 16;
    bx = blk % 4; by = blk / 4;
    if (m <= 8) begin
      x0 = 16*mbx + 4*bx; y0 = 16*mby + 4*by;
      at = (y0 > 0); al = (x0 > 0);
      atr = (by == 0) ? (mby > 0 && (bx < 3 || mbx < MBW-1)) : (bx < 3);
      if (at && !atr && (m == 3 || m == 7)) tr_subst++;
      ref4x4(m, x0, y0, at, al, atr);
      nrows = 4;
    end else begin
      x0 = n*mbx; y0 = n*mby;
      at = (mby > 0); al = (mbx > 0);
      refbig(m, pl, x0, y0, at, al);
      nrows = (m >= 13) ? 16 : 64;
    end
    if (m == 2 || m == 11 || m == 15) dc_case[{al, at}]++;
    mode_cnt[m]++;
    jobs++;
    // expected latency from start to the first prediction row
    rc  = (m >= 3 && m <= 8 || m == 12 || m == 16) ? 4 : 1;
    if (m == 12) pre = 37;
    else if (m == 16) pre = 21;
    else if (m == 2) pre = (at && al) ? 2 : 1;
    else if (m == 11) pre = (at && al) ? 14 : (at || al) ? 6 : 1;
    else if (m == 15) pre = (at && al) ? 2 : 1;   // whole block, not per sub-block
    else pre = 0;

    while (intra_busy) @(negedge clk);
    intra_start = 1'b1;
    intra_mode  = 5'(m);
    blk_idx     = 4'(blk);
    chroma_cr   = cr[0];
    mb_x        = MBX_W'(mbx);
    mb_y        = MBY_W'(mby);
    @(negedge clk);
    intra_start = 1'b0;
    lat = 1;
    first = 1'b1;
    for (int r = 0; r < nrows; r++) begin
      int gap;
      gap = (r == 0) ? INIT_DELAY : (ROW_GAP > 0 ? ROW_GAP : int'($urandom_range(0, 6)));
      for (int g = 1; g < gap; g++) begin
        if (first && pred_valid) begin chk(lat == pre + rc + 1, $sformatf("latency mode %0d: %0d vs %0d", m, lat, pre + rc + 1)); first = 0; end
        @(negedge clk);
        lat++;
      end
      idct_out = 1'b1;
      for (int i = 0; i < 4; i++)
        idct_res[i] = ($urandom_range(0, 9) == 0) ? res_t'($signed($urandom_range(0, 1000)) - 500)
                                                  : res_t'($signed($urandom_range(0, 60)) - 30);
      #1;
      while (!idct_ready) begin
        if (first && pred_valid) begin chk(lat == pre + rc + 1, $sformatf("latency mode %0d", m)); first = 0; end
        idct_wait++;
        @(negedge clk);
        #1;
        lat++;
      end
      if (first) begin chk(lat == pre + rc + 1 || INIT_DELAY > pre + rc + 1, $sformatf("latency mode %0d: %0d vs %0d", m, lat, pre + rc + 1)); first = 0; end
      // the row is taken at the next rising edge
      if (m <= 8) begin ry = r; rx = 0; end
      else begin
        sb = r / 4;
        ry = 4*(sb / (n/4)) + r % 4;
        rx = 4*(sb % (n/4));
      end
      chk(recon_valid, "row taken");
      chk(int'(recon_plane) == pl, "row plane");
      chk(int'(recon_y) == ((m <= 8) ? 4*by + ry : ry) && int'(recon_col4) == ((m <= 8) ? bx : rx/4),
          $sformatf("row position m%0d r%0d", m, r));
      for (int i = 0; i < 4; i++) begin
        int e, rv;
        e  = expb[ry][rx+i];
        rv = clip(e + int'(idct_res[i]));
        if (e + int'(idct_res[i]) != rv) clip_cnt++;
        chk(int'(pred_row[i]) == e, $sformatf("pred m%0d mb(%0d,%0d) blk%0d pl%0d row%0d lane%0d: got %0d exp %0d",
                                               m, mbx, mby, blk, pl, r, i, pred_row[i], e));
        chk(int'(recon_row[i]) == rv, "recon value");
        if (m <= 8) pic[0][16*mby + 4*by + ry][16*mbx + 4*bx + i] = rv;
        else        pic[pl][y0 + ry][x0 + rx + i] = rv;
      end
      @(negedge clk);
      idct_out = 1'b0;
    end
  endtask

  function automatic bit ok4(int m, bit at, bit al);
    case (m)
      0, 3, 7: return at;
      1, 8:    return al;
      4, 5, 6: return at && al;
      default: return 1'b1;
    endcase
  endfunction

  function automatic bit okbig(int m, bit at, bit al);
    case (m)
      9, 13:  return al;
      10, 14: return at;
      12, 16: return at && al;
      default: return 1'b1;
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; cycle = 0;
    tr_subst = 0; idct_wait = 0; pred_wait = 0; clip_cnt = 0; jobs = 0;
    rot16 = 0; rotc = 0; rot4 = 0;
    for (int i = 0; i < 17; i++) mode_cnt[i] = 0;
    for (int i = 0; i < 4; i++) dc_case[i] = 0;
    rst_n = 1'b0; intra_start = 1'b0; intra_mode = '0; blk_idx = '0; chroma_cr = 1'b0;
    mb_x = '0; mb_y = '0; idct_out = 1'b0;
    for (int i = 0; i < 4; i++) idct_res[i] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int mby = 0; mby < MBH; mby++) for (int mbx = 0; mbx < MBW; mbx++) begin
      int m;
      if ((mbx + mby) % 2 == 0) begin
        for (int b = 0; b < 16; b++) begin
          bit at, al;
          at = (16*mby + 4*(b/4)) > 0; al = (16*mbx + 4*(b%4)) > 0;
          do begin m = rot4 % 9; rot4++; end while (!ok4(m, at, al));
          run_job(m, b, 0, mbx, mby);
        end
      end else begin
        do begin m = 9 + rot16 % 4; rot16++; end while (!okbig(m, mby > 0, mbx > 0));
        run_job(m, 0, 0, mbx, mby);
      end
      do begin m = 13 + rotc % 4; rotc++; end while (!okbig(m, mby > 0, mbx > 0));
      run_job(m, 0, 0, mbx, mby);
      run_job(m, 0, 1, mbx, mby);
    end
    while (intra_busy) @(negedge clk);
    // every mechanism must have been exercised
    for (int i = 0; i < 17; i++) chk(mode_cnt[i] > 0, $sformatf("mode %0d never used", i));
    for (int i = 0; i < 4; i++) chk(dc_case[i] > 0, $sformatf("DC availability case %0d never used", i));
    chk(tr_subst > 0, "above-right substitution never used");
    chk(idct_wait > 0, "IDCT never waited for a prediction row");
    chk(pred_wait > 0, "prediction never waited for the IDCT");
    chk(clip_cnt > 0, "reconstruction clipping never used");
    $display("jobs=%0d cycles=%0d idct_wait=%0d pred_wait=%0d tr_subst=%0d clip=%0d dc_cases=%0d/%0d/%0d/%0d",
             jobs, cycle, idct_wait, pred_wait, tr_subst, clip_cnt, dc_case[0], dc_case[1], dc_case[2], dc_case[3]);
    finished = 1'b1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

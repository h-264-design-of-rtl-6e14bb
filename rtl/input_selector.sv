// Input data selector.
//
// Gathers the 33 predictors P0..P32 of the block being predicted from the
// predictor memory of the selected plane and routes, for every cycle of the
// prediction controller's schedule, the four operands, the shift and the
// multiplier coefficient of the COU. It is purely combinational.
//
// Predictor numbering follows the design: for a luma 4x4 block P0..P7 are
// the eight pixels above (P4..P7 above-right), P16..P19 the four to the
// left, P32 the corner above-left; for a luma 16x16 macroblock P0..P15 are
// above, P16..P31 to the left, P32 the corner. Chroma 8x8 uses P0..P7 above
// and P16..P23 to the left (this design's own extension of the numbering).
// Unavailable above-right pixels are replaced by P3, as in H.264.
//
// Operand schedules (this design's own, built from the design's equations):
//  * DC: groups of four predictors are summed with F(g,0) into R0/R1 and
//    accumulated with F(R0,R1,0,-2,0); during the output rows the COU forms
//    the DC value itself as F(R0,R1,0,-2,a) (or F(R0,0,0,-2,2) for one
//    group), as in the design's luma 4x4 DC procedure. The groups depend on
//    neighbour availability (H.264 rules); with no neighbour the value is
//    F(0,0,0,126,0) = 128. Chroma DC follows H.264's per-4x4 rules: a
//    sub-block that takes one side is F(Pi,Pj,Pk,Pl,2) straight from the
//    predictors, one that takes both uses R0 and R1 (sub-block 0: sums from
//    the set-up; sub-block 3: sums formed in rows 1 and 2 of sub-block 0).
//  * luma 4x4 directional: one F per pixel, the 3-tap filter as
//    F(Pi,Pj,Pj,Pk,2) and the 2-tap average as F(Pi,Pj,0,-1,1).
//  * plane: H and V as sums of (i+1)*F(P(8+i),~P(6-i),1,-2,0), then
//    B=F(5H,0,0,30,6), C likewise, A=16*F(P15,P31,0,-2,0); then 2C into
//    R1 and, in R0, a base A+B*(x0-7)+C*(y0-7)+14 of the current 4x4
//    block, moved by 4B per 4x4 column and by -12B+4C per row of 4x4
//    blocks. Pixel (x0+dx, y0+dy) is F(R0, dx*B, Y, Z, 5) with Y+Z = dy*C
//    from C (R3) and 2C (R1): one product per pixel for the one multiplier.
//    Chroma uses 34*H, (x-3), (y-3), four terms and -4B, as H.264 does.
//
// Inputs: the controller's phase, step (pre-computation step), row index
// (output row in 4x4-block raster order) and k (cycle within the row).
// Outputs: predictors, COU operation, the row of four values for the
// horizontal/vertical/DC modes, the number of pre-computation steps needed
// by the current block, and availability flags.
module input_selector
  import intra_pkg::*;
(
  input  mode_e       mode,
  input  logic [3:0]  blk_idx,        // luma 4x4 block, raster order in MB
  input  logic        mb_left_edge,   // macroblock is in picture column 0
  input  logic        mb_top_edge,    // macroblock is in picture row 0
  input  logic        mb_right_edge,  // macroblock is in the last column
  input  pix_t        top_line [20],
  input  pix_t        left_col [16],
  input  pix_t        corner,
  input  pix_t        cur [16][16],
  input  reg_t        r [4],
  input  phase_e      phase,
  input  logic [5:0]  step,
  input  logic [5:0]  row,
  input  logic [2:0]  k,
  output pix_t        p [NP],
  output cou_op_t     op,
  output pix_t        direct_row [4],
  output logic [5:0]  pre_len,
  output logic        avail_top,
  output logic        avail_left
);

  int   br, bc;             // luma 4x4 block row/column
  int   sb, sbx, sby, ry, x0;
  logic avail_tr;
  pix_t e [13];             // L3 L2 L1 L0 Q T0..T7 for the 4x4 modes
  int   nsets;
  int   set_base [8];       // first predictor index of each DC group
  int   half, c0, ksum;

  function automatic cou_t px(pix_t v);
    return cou_t'({1'b0, v});
  endfunction

  // ---------------- predictor gathering ----------------
  always_comb begin
    br = int'(blk_idx[3:2]);
    bc = int'(blk_idx[1:0]);
    for (int i = 0; i < NP; i++) p[i] = '0;
    avail_tr = 1'b0;
    if (is_luma4(mode)) begin
      avail_top  = (br > 0) || !mb_top_edge;
      avail_left = (bc > 0) || !mb_left_edge;
      avail_tr   = (br == 0) ? (!mb_top_edge && ((bc < 3) || !mb_right_edge)) : (bc < 3);
      for (int i = 0; i < 8; i++) begin
        if (br == 0) p[i] = top_line[4*bc + i];
        else if (4*bc + i < 16) p[i] = cur[4*br-1][4*bc + i];
        else p[i] = '0;
      end
      if (!avail_tr) for (int i = 4; i < 8; i++) p[i] = p[3];
      for (int j = 0; j < 4; j++)
        p[16+j] = (bc == 0) ? left_col[4*br + j] : cur[4*br + j][4*bc-1];
      if (br == 0 && bc == 0) p[32] = corner;
      else if (br == 0)       p[32] = top_line[4*bc-1];
      else if (bc == 0)       p[32] = left_col[4*br-1];
      else                    p[32] = cur[4*br-1][4*bc-1];
    end else begin
      avail_top  = !mb_top_edge;
      avail_left = !mb_left_edge;
      for (int i = 0; i < 16; i++) begin
        if (!is_chroma(mode) || i < 8) begin
          p[i]    = top_line[i];
          p[16+i] = left_col[i];
        end
      end
      p[32] = corner;
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) e[i] = p[19-i];
    e[4] = p[32];
    for (int i = 0; i < 8; i++) e[5+i] = p[i];
  end

  // ---------------- output row position ----------------
  always_comb begin
    sb = int'(row[5:2]);
    if (is_luma4(mode))        begin sbx = 0; sby = 0; end
    else if (is_chroma(mode))  begin sbx = sb % 2; sby = sb / 2; end
    else                       begin sbx = sb % 4; sby = sb / 4; end
    ry = 4*sby + int'(row[1:0]);
    x0 = 4*sbx;
  end

  // ---------------- DC groups ----------------
  always_comb begin
    nsets = 0;
    for (int g = 0; g < 8; g++) set_base[g] = 0;
    case (mode)
      M4_DC: begin
        if (avail_top)  begin set_base[nsets] = 0;  nsets++; end
        if (avail_left) begin set_base[nsets] = 16; nsets++; end
      end
      M16_DC: begin
        if (avail_top)  for (int g = 0; g < 4; g++) begin set_base[nsets] = 4*g;      nsets++; end
        if (avail_left) for (int g = 0; g < 4; g++) begin set_base[nsets] = 16 + 4*g; nsets++; end
      end
      MC_DC: begin
        if (sbx == sby) begin
          if (avail_top)  begin set_base[nsets] = 4*sbx;      nsets++; end
          if (avail_left) begin set_base[nsets] = 16 + 4*sby; nsets++; end
        end else if (sbx == 1) begin
          if (avail_top)       begin set_base[0] = 4*sbx;      nsets = 1; end
          else if (avail_left) begin set_base[0] = 16 + 4*sby; nsets = 1; end
        end else begin
          if (avail_left)      begin set_base[0] = 16 + 4*sby; nsets = 1; end
          else if (avail_top)  begin set_base[0] = 4*sbx;      nsets = 1; end
        end
      end
      default: ;
    endcase
  end

  // ---------------- number of pre-computation steps ----------------
  always_comb begin
    half = is_chroma(mode) ? 4 : 8;
    c0   = half - 1;
    case (mode)
      M4_DC, M16_DC: pre_len = (nsets <= 1) ? 6'(nsets) : 6'(2*nsets - 2);
      MC_DC:         pre_len = (avail_top && avail_left) ? 6'd2 : 6'd0;
      M16_PLANE, MC_PLANE:  pre_len = 6'(4*half + 5);
      default:              pre_len = 6'd0;
    endcase
  end

  // ---------------- direct rows (H, V, DC) ----------------
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      case (mode)
        M4_V, M16_V, MC_V: direct_row[i] = p[x0 + i];
        M4_H, M16_H, MC_H: direct_row[i] = p[16 + ry];
        default:           direct_row[i] = '0;
      endcase
    end
  end

  // ---------------- COU operation ----------------
  function automatic cou_op_t mk(cou_t w, cou_t x, cou_t y, cou_t z, int a);
    cou_op_t o;
    o.w = w; o.x = x; o.y = y; o.z = z;
    o.alpha = 3'(a);
    o.mul_en = 1'b0;
    o.coef = '0;
    return o;
  endfunction

  function automatic cou_op_t tap3(pix_t a, pix_t b, pix_t c);
    return mk(px(a), px(b), px(b), px(c), 2);
  endfunction

  function automatic cou_op_t tap2(pix_t a, pix_t b);
    return mk(px(a), px(b), '0, -cou_t'(1), 1);
  endfunction

  function automatic cou_op_t mkmul(cou_t w, cou_t x, int coef, cou_t z, int a);
    cou_op_t o;
    o = mk(w, x, '0, z, a);
    o.mul_en = 1'b1;
    o.coef = coef_t'(coef);
    return o;
  endfunction

  always_comb begin
    int s, xx, yy, zz, c, g, i, hb, sect;  // all assigned first below
    cou_t r0, r1, r2, r3;
    zz = 0; c = 0; g = 0; i = 0; hb = 0; sect = 0;
    r0 = cou_t'(r[0]); r1 = cou_t'(r[1]); r2 = cou_t'(r[2]); r3 = cou_t'(r[3]);
    op = mk('0, '0, '0, '0, 0);
    s  = int'(step);
    xx = int'(k);
    yy = int'(row[1:0]);
    ksum = is_chroma(mode) ? 34 : 5;
    if (phase == PH_PRE) begin
      case (mode)
        M4_DC, M16_DC, MC_DC: begin
          if (s == 0 || (s % 2) == 1) begin
            g = (s + 1) / 2;
            hb = set_base[g];
            op = mk(px(p[hb]), px(p[hb+1]), px(p[hb+2]), px(p[hb+3]), 0);
          end else begin
            op = mk(r0, r1, '0, -cou_t'(2), 0);
          end
        end
        M16_PLANE, MC_PLANE: begin
          // sect 0: H terms, sect 1: V terms
          // first difference into R0, then each further difference into
          // R1 followed by R0 += (c+1)*R1
          sect = (s < 2*half) ? 0 : 1;
          i = (sect == 0) ? s : s - 2*half;
          if (s == 2*half - 1 || s == 4*half - 1) begin
            op = mkmul('0, r0, ksum, cou_t'(30), 6);
          end else if (s == 4*half) begin
            op = mk(px(p[2*half-1]), px(p[16 + 2*half-1]), '0, -cou_t'(2), 0);
          end else if (s == 4*half + 1) begin
            op = mkmul('0, r0, 16, -cou_t'(2), 0);
          end else if (s == 4*half + 2) begin
            op = mk(r3, r3, '0, -cou_t'(2), 0);                // 2C -> R1
          end else if (s == 4*half + 3) begin
            op = mkmul(r0, r2, -c0, cou_t'(12), 0);            // A - c0*B + 14
          end else if (s == 4*half + 4) begin
            op = mkmul(r0, r3, -c0, -cou_t'(2), 0);            // ... - c0*C
          end else if (i == 0 || (i % 2) == 1) begin
            c = (i + 1) / 2;
            if (sect == 0)
              op = mk(px(p[half + c]), ~px((half-2-c) < 0 ? p[32] : p[half-2-c]),
                      cou_t'(1), -cou_t'(2), 0);
            else
              op = mk(px(p[16 + half + c]), ~px((half-2-c) < 0 ? p[32] : p[16 + half-2-c]),
                      cou_t'(1), -cou_t'(2), 0);
          end else begin
            c = i / 2;
            op = mkmul(r0, r1, c + 1, -cou_t'(2), 0);
          end
        end
        default: ;
      endcase
    end else if (phase == PH_ROW) begin
      case (mode)
        M4_DDL: begin
          if (xx == 3 && yy == 3) op = mk(px(e[11]), px(e[12]), px(e[12]), px(e[12]), 2);
          else begin c = 6 + xx + yy; op = tap3(e[c-1], e[c], e[c+1]); end
        end
        M4_DDR: begin
          c = 4 + xx - yy; op = tap3(e[c-1], e[c], e[c+1]);
        end
        M4_VR: begin
          zz = 2*xx - yy;
          if (zz >= 0 && (zz % 2) == 0) op = tap2(e[4 + xx - yy/2], e[5 + xx - yy/2]);
          else if (zz >= 0)             begin c = 4 + xx - yy/2; op = tap3(e[c-1], e[c], e[c+1]); end
          else if (zz == -1)            op = tap3(e[3], e[4], e[5]);
          else                          begin c = 5 - yy; op = tap3(e[c-1], e[c], e[c+1]); end
        end
        M4_HD: begin
          zz = 2*yy - xx;
          if (zz >= 0 && (zz % 2) == 0) op = tap2(e[4 - yy + xx/2], e[3 - yy + xx/2]);
          else if (zz >= 0)             begin c = 4 - yy + xx/2; op = tap3(e[c-1], e[c], e[c+1]); end
          else if (zz == -1)            op = tap3(e[3], e[4], e[5]);
          else                          begin c = 3 + xx; op = tap3(e[c-1], e[c], e[c+1]); end
        end
        M4_VL: begin
          if ((yy % 2) == 0) op = tap2(e[5 + xx + yy/2], e[6 + xx + yy/2]);
          else begin c = 6 + xx + yy/2; op = tap3(e[c-1], e[c], e[c+1]); end
        end
        M4_HU: begin
          zz = xx + 2*yy;
          if (zz < 5 && (zz % 2) == 0) op = tap2(e[3 - yy - xx/2], e[2 - yy - xx/2]);
          else if (zz < 5)             begin c = 2 - yy - xx/2; op = tap3(e[c-1], e[c], e[c+1]); end
          else if (zz == 5)            op = mk(px(e[1]), px(e[0]), px(e[0]), px(e[0]), 2);
          else                         op = mk(px(e[0]), px(e[0]), px(e[0]), px(e[0]), 2);
        end
        MC_DC: begin
          // per 4x4 sub-block: one side directly, both sides from R0/R1;
          // rows 1 and 2 of sub-block 0 (repeated rows) form the sums of
          // sub-block 3
          if (nsets == 0)      op = mk('0, '0, '0, cou_t'(126), 0);
          else if (nsets == 1) begin
            hb = set_base[0];
            op = mk(px(p[hb]), px(p[hb+1]), px(p[hb+2]), px(p[hb+3]), 2);
          end else if (sb == 0 && yy == 1) op = mk(px(p[4]), px(p[5]), px(p[6]), px(p[7]), 0);
          else if (sb == 0 && yy == 2)     op = mk(px(p[20]), px(p[21]), px(p[22]), px(p[23]), 0);
          else                             op = mk(r0, r1, '0, -cou_t'(2), 3);
        end
        M4_DC, M16_DC: begin
          // the DC value itself is formed by the COU in every row cycle
          case (nsets)
            0: op = mk('0, '0, '0, cou_t'(126), 0);
            1: op = mk(r0, '0, '0, -cou_t'(2), 2);
            2: op = mk(r0, r1, '0, -cou_t'(2), 3);
            4: op = mk(r0, r1, '0, -cou_t'(2), 4);
            default: op = mk(r0, r1, '0, -cou_t'(2), 5);
          endcase
        end
        M16_PLANE, MC_PLANE: begin
          // R0 = A + B*(x0-c0) + C*(y0-c0) + 14 for the current 4x4
          // sub-block, R1 = 2C, R2 = B, R3 = C
          if (yy == 0 && sb != 0) i = (sbx == 0) ? 2 : 1;   // base moves first
          if (xx < i) begin
            if (i == 1)       op = mkmul(r0, r2, 4, -cou_t'(2), 0);   // next column: +4B
            else if (xx == 0) op = mkmul(r0, r2, 4 - 2*half, -cou_t'(2), 0);
            else              op = mk(r0, r1, r1, -cou_t'(2), 0);     // next row: +4C
          end else begin
            // pixel (x0+c, y0+yy): R0 + c*B + yy*C (+16 with F's +2)
            c = xx - i;
            case (yy)
              0:       op = mk(r0, r2, '0, '0, 5);
              1:       op = mk(r0, r2, r3, '0, 5);
              2:       op = mk(r0, r2, r1, '0, 5);
              default: op = mk(r0, r2, r1, r3, 5);
            endcase
            op.mul_en = 1'b1;
            op.coef   = coef_t'(c);
          end
        end
        default: ;
      endcase
    end
  end

endmodule

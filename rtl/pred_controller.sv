// Prediction controller.
//
// Sequences one prediction job: a luma 4x4 block, a luma 16x16 macroblock
// or one chroma 8x8 block (Cb or Cr). A job is started with start while
// idle; the mode, block index and plane are latched. The controller then
// runs
//   PH_PRE  (DC and plane modes only) for pre_len cycles, given by the
//           input data selector: DC partial sums, or H, B, V, C and A of
//           the plane modes, one COU operation per cycle written into the
//           register file;
//   PH_ROW  producing the output rows in 4x4-block raster order (4 rows for
//           a 4x4 block, 64 for 16x16, 16 for chroma). A row costs one
//           cycle for horizontal, vertical and DC (the DC value comes from
//           the COU and fills all four lanes); four cycles for the luma
//           4x4 directional modes (three values go to R0..R2, the fourth
//           comes straight from the COU); four cycles for plane (three
//           pixels into the output generator's staging lanes, the fourth
//           from the COU), plus one or two cycles at the start of each 4x4
//           sub-block after the first to move the sub-block base in R0.
// Chroma DC follows H.264's per-4x4 rules: with both neighbours present,
// PH_PRE puts the top and left sums of sub-block 0 into R0 and R1; during
// rows 1 and 2 of sub-block 0, which repeat row 0, the COU puts the sums of
// sub-block 3 into R0 and R1; sub-blocks 1 and 2 take one side each and
// need no register. That gives 2 + 16 cycles per chroma block.
// A row is committed to the output data generator only when og_ready;
// otherwise the controller holds (stall). A DC block with no neighbour at
// all, and a chroma DC block with fewer than two, spends one empty PH_PRE
// cycle. done pulses with the commit of the last row. Which register each step writes follows
// the design's buffer procedures; the cycle schedule is this design's own.
module pred_controller
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mode_e       mode_in,
  input  logic [3:0]  blk_in,
  input  logic        cr_in,        // chroma job: 0 = Cb, 1 = Cr
  input  logic [5:0]  pre_len,
  input  logic        og_ready,
  output mode_e       mode,
  output logic [3:0]  blk,
  output logic [1:0]  plane,        // 0 = Y, 1 = Cb, 2 = Cr
  output phase_e      phase,
  output logic [5:0]  step,
  output logic [5:0]  row,
  output logic [2:0]  k,
  // register file
  output logic        rf_we,
  output logic [1:0]  rf_waddr,
  // output data generator
  output logic        stage_we,
  output logic [1:0]  stage_lane,
  output logic        commit,
  output logic [2:0]  commit_src,   // 0 direct row, 1 R0..R2+COU, 2 staging+COU, 3 COU x4, 4 repeat
  output logic [3:0]  commit_y,     // row inside the macroblock / chroma block
  output logic [1:0]  commit_col4,  // 4-pixel column inside it
  output logic        busy,
  output logic        done,
  output logic        stall
);

  logic       cr_q;
  logic [5:0] nrows;
  logic [2:0] row_cycles;
  logic       want_commit;
  logic       cdc_both;     // chroma DC with both neighbours (pre_len 2)
  logic       is_plane;
  int         half, ntrans;

  always_comb begin
    half = is_chroma(mode) ? 4 : 8;
    if (is_luma4(mode))       nrows = 6'd3;
    else if (is_chroma(mode)) nrows = 6'd15;
    else                      nrows = 6'd63;
    // plane: the first row of every 4x4 sub-block but the first starts
    // with one (next column) or two (next row of sub-blocks) cycles that
    // move the sub-block base in R0
    is_plane = (mode == M16_PLANE || mode == MC_PLANE);
    ntrans = 0;
    if (is_plane && row[1:0] == 2'd0 && row[5:2] != 4'd0)
      ntrans = ((int'(row[5:2]) % (is_chroma(mode) ? 2 : 4)) == 0) ? 2 : 1;
    case (mode)
      M4_DDL, M4_DDR, M4_VR, M4_HD, M4_VL, M4_HU: row_cycles = 3'd4;
      M16_PLANE, MC_PLANE:                        row_cycles = 3'(4 + ntrans);
      default:                                    row_cycles = 3'd1;
    endcase
    plane = is_chroma(mode) ? (cr_q ? 2'd2 : 2'd1) : 2'd0;
  end

  // Control outputs of the current cycle.
  always_comb begin
    int s, sb;
    rf_we = 1'b0; rf_waddr = 2'd0;
    stage_we = 1'b0; stage_lane = 2'd0;
    want_commit = 1'b0; commit_src = 3'd0;
    s = int'(step);
    cdc_both = (mode == MC_DC) && (pre_len == 6'd2);
    if (phase == PH_PRE && pre_len != 0) begin
      rf_we = 1'b1;
      case (mode)
        M16_PLANE, MC_PLANE: begin
          // H terms 0..2n-2, B, V terms, C, A, 2C, first sub-block base
          // (n = half)
          if (s == 2*half - 1)          rf_waddr = 2'd2;
          else if (s == 4*half - 1)     rf_waddr = 2'd3;
          else if (s == 4*half + 2)     rf_waddr = 2'd1;
          else if (s >= 4*half)         rf_waddr = 2'd0;
          else if (s < 2*half)          rf_waddr = (s % 2 == 1) ? 2'd1 : 2'd0;
          else                          rf_waddr = ((s - 2*half) % 2 == 1) ? 2'd1 : 2'd0;
        end
        default: rf_waddr = (s % 2 == 1) ? 2'd1 : 2'd0;  // DC modes
      endcase
    end else if (phase == PH_ROW) begin
      case (row_cycles)
        3'd4, 3'd5, 3'd6: begin
          if (is_plane) begin
            if (int'(k) < ntrans) begin rf_we = 1'b1; rf_waddr = 2'd0; end
            else if (int'(k) < ntrans + 3) begin stage_we = 1'b1; stage_lane = 2'(int'(k) - ntrans); end
            else begin want_commit = 1'b1; commit_src = 3'd2; end
          end else if (k < 3) begin rf_we = 1'b1; rf_waddr = k[1:0]; end
          else begin want_commit = 1'b1; commit_src = 3'd1; end
        end
        default: begin
          want_commit = 1'b1;
          commit_src  = (mode == M4_DC || mode == M16_DC || mode == MC_DC) ? 3'd3 : 3'd0;
          if (cdc_both && row[5:2] == 4'd0 && row[1:0] != 2'd0) begin
            commit_src = 3'd4;
            // the sums of sub-block 3 go to R0 (row 1) and R1 (row 2)
            if (row[1:0] != 2'd3 && og_ready) begin
              rf_we = 1'b1; rf_waddr = (row[1:0] == 2'd1) ? 2'd0 : 2'd1;
            end
          end
        end
      endcase
    end
    stall  = want_commit && !og_ready;
    commit = want_commit && og_ready;
    // position of the row
    sb = int'(row[5:2]);
    if (is_luma4(mode)) begin
      commit_y    = {blk[3:2], row[1:0]};
      commit_col4 = blk[1:0];
    end else if (is_chroma(mode)) begin
      commit_y    = 4'(4*(sb/2)) + {2'b00, row[1:0]};
      commit_col4 = 2'(sb % 2);
    end else begin
      commit_y    = 4'(4*(sb/4)) + {2'b00, row[1:0]};
      commit_col4 = 2'(sb % 4);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      mode  <= M4_V;
      blk   <= '0;
      cr_q  <= 1'b0;
      step  <= '0;
      row   <= '0;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (phase)
        PH_IDLE: if (start) begin
          mode  <= mode_in;
          blk   <= blk_in;
          cr_q  <= cr_in;
          phase <= (mode_in == M4_DC || mode_in == M16_DC || mode_in == MC_DC ||
                    mode_in == M16_PLANE || mode_in == MC_PLANE) ? PH_PRE : PH_ROW;
          step  <= '0;
          row   <= '0;
          k     <= '0;
        end
        PH_PRE: begin
          if (pre_len == 0 || step == pre_len - 1) begin
            phase <= PH_ROW;
            step  <= '0;
            k     <= '0;
          end else begin
            step <= step + 1'b1;
          end
        end
        PH_ROW: begin
          if (!stall) begin
            if (k == row_cycles - 1) begin
              k <= '0;
              if (row == nrows) begin
                phase <= PH_IDLE;
                done  <= 1'b1;
              end else begin
                row <= row + 1'b1;
              end
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

endmodule

// Shared types and constants of the H.264 intra prediction circuit.
//
// Widths: pixels are 8 bits; the four intermediate buffers R0..R3 are 15-bit
// signed, as in the design; the common operations unit (COU) works internally
// at 22 bits signed so that the widest intermediate of the plane modes
// (34*H for chroma, up to 86,700) never overflows. IDCT residuals are taken
// as 10-bit signed values (-512..511), which is this design's own choice.
//
// Mode codes 0..16 number the 17 prediction modes. Codes 0..8 are the luma
// 4x4 modes with the H.264 numbering (0 vertical, 1 horizontal, 2 DC,
// 3 diagonal down-left, 4 diagonal down-right, 5 vertical-right,
// 6 horizontal-down, 7 vertical-left, 8 horizontal-up). Codes 9..12 are the
// luma 16x16 modes and 13..16 the chroma 8x8 modes.
package intra_pkg;

  localparam int PIX_W = 8;
  localparam int REG_W = 15;
  localparam int COU_W = 22;
  localparam int RES_W = 10;
  localparam int MUL_W = 7;     // signed coefficient of the COU multiplier
  localparam int NP    = 33;    // predictors P0..P32

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [REG_W-1:0] reg_t;
  typedef logic signed [COU_W-1:0] cou_t;
  typedef logic signed [RES_W-1:0] res_t;
  typedef logic signed [MUL_W-1:0] coef_t;

  typedef enum logic [4:0] {
    M4_V      = 5'd0,
    M4_H      = 5'd1,
    M4_DC     = 5'd2,
    M4_DDL    = 5'd3,
    M4_DDR    = 5'd4,
    M4_VR     = 5'd5,
    M4_HD     = 5'd6,
    M4_VL     = 5'd7,
    M4_HU     = 5'd8,
    M16_H     = 5'd9,
    M16_V     = 5'd10,
    M16_DC    = 5'd11,
    M16_PLANE = 5'd12,
    MC_H      = 5'd13,
    MC_V      = 5'd14,
    MC_DC     = 5'd15,
    MC_PLANE  = 5'd16
  } mode_e;

  // Phase of the prediction controller.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_PRE   = 2'd1,   // per-block set-up: DC sums, plane H/V/A/B/C
    PH_ROW   = 2'd2    // producing output rows
  } phase_e;

  // Operands of one COU operation.
  typedef struct packed {
    cou_t         w;
    cou_t         x;
    cou_t         y;
    cou_t         z;
    logic [2:0]   alpha;
    logic         mul_en;   // X is multiplied by coef before the adders
    coef_t        coef;
  } cou_op_t;

  function automatic logic is_luma4(mode_e m);
    return m <= M4_HU;
  endfunction

  function automatic logic is_chroma(mode_e m);
    return m >= MC_H;
  endfunction

  function automatic pix_t clip1(cou_t v);
    if (v < 0) return '0;
    else if (v > 255) return 8'd255;
    else return v[PIX_W-1:0];
  endfunction

endpackage

// Register file of four 15-bit buffers R0..R3.
//
// Holds the intermediate results of the COU between cycles: partial DC
// sums, the plane parameters H, V, A, B and C, and the first three
// prediction values of a luma 4x4 row. One register is written per cycle
// (we with a 2-bit address) from the COU result, which is truncated to
// 15 bits; all four are readable at once. Synchronous active-low reset
// clears them.
module reg_file
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] waddr,
  input  cou_t       wdata,
  output reg_t       r [4]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else if (we) begin
      r[waddr] <= wdata[REG_W-1:0];
    end
  end

endmodule

// dct2d_top: 8x8 2-D DCT core built from two DA-based 1-D DCTs with
// error-compensated adder trees and a transpose buffer.
//
// One row of eight 9-bit signed samples (X0..X7) enters every clock; one
// vector of eight 12-bit 2-D DCT coefficients (Z0..Z7) leaves every clock,
// so the core transforms 8 samples per cycle.  Blocks are 8 consecutive
// rows, the first one starting in the first cycle after RST is released;
// there is no valid input, the core streams continuously.
//   row pass:    dct1d, 9-bit in, 12-bit out (registered, 1 cycle)
//   transpose:   transpose_buffer, 12-bit words (8-cycle block turn-around)
//   column pass: dct1d, 12-bit in, 15-bit internal, registered (1 cycle)
//   output:      saturation of the 15-bit column result to 12 bits
// Latency: the first output vector of a block appears 10 clocks after the
// block's first input row.  Output vector t of a block (Z_COL = t) is column
// t of the 2-D transform: Zu = F(u, t), where u indexes the vertical
// frequency (across rows) and t the horizontal one (along a row).  F is the
// orthonormal 2-D DCT, F(u,v) = (1/4) c_u c_v sum_x sum_y f(x,y)
// cos((2x+1)u pi/16) cos((2y+1)v pi/16), computed with 9-bit DA coefficients.
// Z_VALID marks valid output vectors (from the first block on).  RST is
// synchronous and active high; it is delayed by one cycle for the transpose
// buffer so that the buffer's row count lines up with the row pass output.
// The 12-bit ports, 9-bit input, 12-bit buffer, 9-bit DA precision and the
// 10-cycle latency follow the source design; Z_VALID, Z_COL, the column-pass
// width and the output saturation are this implementation's choices.
module dct2d_top
  import dct_pkg::*;
(
  input  logic                    CLK,
  input  logic                    RST,
  input  logic signed [IN_W-1:0]  X0, X1, X2, X3, X4, X5, X6, X7,
  output logic signed [OUT_W-1:0] Z0, Z1, Z2, Z3, Z4, Z5, Z6, Z7,
  output logic                    Z_VALID,
  output logic [2:0]              Z_COL
);

  localparam int P2 = TB_W + 3;   // column-pass word width

  logic signed [IN_W-1:0]  x   [8];
  logic signed [TB_W-1:0]  z1  [8];
  logic signed [TB_W-1:0]  tr  [8];
  logic signed [P2-1:0]    z2  [8];
  logic signed [OUT_W-1:0] zs  [8];
  logic                    rst_q;
  logic                    tr_valid;
  logic [2:0]              tr_idx;

  assign x = '{X0, X1, X2, X3, X4, X5, X6, X7};

  always_ff @(posedge CLK) rst_q <= RST;

  dct1d #(.WI(IN_W), .Q(DA_Q)) u_row (
    .clk (CLK),
    .rst (RST),
    .x   (x),
    .z   (z1)
  );

  transpose_buffer #(.W(TB_W)) u_tbuf (
    .clk      (CLK),
    .rst      (rst_q),
    .din      (z1),
    .dout     (tr),
    .rd_valid (tr_valid),
    .mode     (),
    .idx      (tr_idx)
  );

  dct1d #(.WI(TB_W), .Q(DA_Q)) u_col (
    .clk (CLK),
    .rst (RST),
    .x   (tr),
    .z   (z2)
  );

  always_ff @(posedge CLK) begin
    if (RST) begin
      Z_VALID <= 1'b0;
      Z_COL   <= '0;
    end else begin
      Z_VALID <= tr_valid;
      Z_COL   <= tr_idx;
    end
  end

  localparam logic signed [P2-1:0] ZMAX = P2'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [P2-1:0] ZMIN = -P2'(1 <<< (OUT_W - 1));

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      if (z2[n] > ZMAX)      zs[n] = ZMAX[OUT_W-1:0];
      else if (z2[n] < ZMIN) zs[n] = ZMIN[OUT_W-1:0];
      else                   zs[n] = z2[n][OUT_W-1:0];
    end
  end

  assign {Z0, Z1, Z2, Z3, Z4, Z5, Z6, Z7} =
         {zs[0], zs[1], zs[2], zs[3], zs[4], zs[5], zs[6], zs[7]};

endmodule

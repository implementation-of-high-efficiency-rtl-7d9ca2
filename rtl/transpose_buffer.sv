// transpose_buffer: 8x8 transpose memory between the row and column passes
// of the 2-D DCT, holding W-bit words.
//
// A single 8x8 register array is used without double buffering.  Every
// clock one line (8 words) is read and the incoming 8-word vector is written
// into that same line, so the line that is read out is refilled in the same
// cycle.  The line is a row while mode = 0 and a column while mode = 1; the
// mode flips after every 8 vectors.  A block written row by row is thus read
// column by column while the next block is written column by column, and
// that block is later read row by row: the data always leave transposed.
// Timing: the vector on din in cycle t is stored at the clock edge ending t;
// dout is combinational from the array, so the first column of a block is
// available in the cycle after its eighth row was written (8 cycles after
// its first row).  The buffer streams continuously: no valid or stall input.
// rd_valid rises when the first full block is available.  idx is the line
// index (0..7) used in the current cycle.  Synchronous active-high reset
// clears the array and starts a new block with mode = 0.
module transpose_buffer #(
  parameter int W = 12   // word length
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] din  [8],
  output logic signed [W-1:0] dout [8],
  output logic                rd_valid,
  output logic                mode,
  output logic [2:0]          idx
);

  logic signed [W-1:0] mem [8][8];   // mem[row][col]

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      dout[k] = mode ? mem[k][idx] : mem[idx][k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx      <= '0;
      mode     <= 1'b0;
      rd_valid <= 1'b0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) mem[r][c] <= '0;
    end else begin
      idx <= idx + 3'd1;
      if (idx == 3'd7) begin
        mode     <= ~mode;
        rd_valid <= 1'b1;
      end
      for (int k = 0; k < 8; k++) begin
        if (mode) mem[k][idx] <= din[k];
        else      mem[idx][k] <= din[k];
      end
    end
  end

endmodule

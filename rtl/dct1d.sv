// dct1d: 8-point DA-based 1-D DCT with error-compensated adder trees.
//
// Computes Zn = (1/2) * c_n * sum_m x_m * cos((2m+1) n pi / 16), c_0 = 1/sqrt(2),
// c_n = 1 otherwise (the orthonormal DCT), with Q-bit DA coefficients.  The
// DA-Butterfly-Matrix produces the Q DA words of every output; eight ECATs,
// one per output, add them in parallel (the ECAT's built-in 1/2 is the
// transform's 1/2) and round with error compensation.  The result is
// registered, so a new 8-sample vector is accepted every clock and its
// transform appears on z one clock later.  Synchronous active-high reset
// clears the output register.
// Output width is P = WI + 3; for 9-bit samples this is the 12-bit word
// length of the source design.  For wider inputs (the column pass of the
// 2-D DCT) the words, and so the ECATs, grow with the input.
module dct1d
  import dct_pkg::*;
#(
  parameter int WI = IN_W,     // sample width
  parameter int Q  = DA_Q,     // DA precision
  parameter int P  = WI + 3    // DA word / ECAT / output width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [WI-1:0] x [8],
  output logic signed [P-1:0]  z [8]
);

  logic signed [P-1:0] y  [8][Q];
  logic signed [P-1:0] zc [8];

  da_butterfly_matrix #(.WI(WI), .Q(Q), .P(P)) u_bfm (
    .x (x),
    .y (y)
  );

  for (genvar n = 0; n < 8; n++) begin : g_ecat
    ecat #(.P(P), .Q(Q)) u_ecat (
      .y (y[n]),
      .z (zc[n])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < 8; n++) z[n] <= '0;
    end else begin
      for (int n = 0; n < 8; n++) z[n] <= zc[n];
    end
  end

endmodule

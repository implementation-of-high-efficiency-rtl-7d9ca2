// da_butterfly_matrix: front half of the 8-point DA-based 1-D DCT.
//
// Turns eight samples x0..x7 into the Q DA words of each of the eight
// outputs Z0..Z7, using no multiplier:
//   stage 1 butterfly (8 adders/subtractors):
//     a_i = x_i + x_(7-i),  b_i = x_i - x_(7-i),   i = 0..3
//   stage 2 butterfly on the even half (4 adders/subtractors):
//     A0 = a0 + a3,  A1 = a1 + a2,  B0 = a0 - a3,  B1 = a1 - a2
//   two DAEs:  [Z0 Z4] from [A0 A1] with [[C4 C4] [C4 -C4]]
//              [Z2 Z6] from [B0 B1] with [[C2 C6] [C6 -C2]]
//   one DAO:   [Z1 Z3 Z5 Z7] from [b0..b3]
// y[n][j] is DA word j of output Zn; sum_j y[n][j] * 2^-j equals Zn (before
// the 1/2 scaling) with coefficients quantised to Q bits.  Words are
// P = WI + 3 bits, enough for the largest subset sum of the inputs.
// Combinational.
module da_butterfly_matrix
  import dct_pkg::*;
#(
  parameter int WI = IN_W,     // sample width
  parameter int Q  = DA_Q,     // DA precision
  parameter int P  = WI + 3    // DA word width
) (
  input  logic signed [WI-1:0] x [8],
  output logic signed [P-1:0]  y [8][Q]
);

  logic signed [WI:0]   a  [4];
  logic signed [WI:0]   b  [4];
  logic signed [WI+1:0] ee [2];   // A0, A1
  logic signed [WI+1:0] eo [2];   // B0, B1

  for (genvar i = 0; i < 4; i++) begin : g_bf1
    assign a[i] = (WI+1)'(x[i]) + (WI+1)'(x[7-i]);
    assign b[i] = (WI+1)'(x[i]) - (WI+1)'(x[7-i]);
  end

  assign ee[0] = (WI+2)'(a[0]) + (WI+2)'(a[3]);
  assign ee[1] = (WI+2)'(a[1]) + (WI+2)'(a[2]);
  assign eo[0] = (WI+2)'(a[0]) - (WI+2)'(a[3]);
  assign eo[1] = (WI+2)'(a[1]) - (WI+2)'(a[2]);

  logic signed [P-1:0] yee [2][Q];
  logic signed [P-1:0] yeo [2][Q];
  logic signed [P-1:0] yo  [4][Q];

  dae #(.UW(WI+2), .WW(P), .Q(Q),
        .K00(EE_K00), .K01(EE_K01), .K10(EE_K10), .K11(EE_K11)) u_dae_ee (
    .u (ee),
    .y (yee)
  );

  dae #(.UW(WI+2), .WW(P), .Q(Q),
        .K00(EO_K00), .K01(EO_K01), .K10(EO_K10), .K11(EO_K11)) u_dae_eo (
    .u (eo),
    .y (yeo)
  );

  dao #(.UW(WI+1), .WW(P), .Q(Q)) u_dao (
    .b (b),
    .y (yo)
  );

  for (genvar j = 0; j < Q; j++) begin : g_map
    assign y[0][j] = yee[0][j];
    assign y[4][j] = yee[1][j];
    assign y[2][j] = yeo[0][j];
    assign y[6][j] = yeo[1][j];
    assign y[1][j] = yo[0][j];
    assign y[3][j] = yo[1][j];
    assign y[5][j] = yo[2][j];
    assign y[7][j] = yo[3][j];
  end

endmodule

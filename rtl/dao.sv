// dao: DA odd processing element.
//
// Evaluates the odd half of the 8-point DCT, [Z1 Z3 Z5 Z7] = C_o * [b0..b3],
// in distributed-arithmetic form.  The sums of input subsets that the Q-bit
// coefficients call for are formed once and shared by the four outputs.
// For Q = 9 these are the six pair sums and three triple sums (b0+b1+b2,
// b0+b1+b3, b1+b2+b3), each triple reusing a pair: nine adders, the count
// of the source design.  The remaining subset sums are written too so that
// other precisions work; no coefficient bit selects them at Q = 9 and
// synthesis removes them.  DA word y[n][j] is the subset sum
// selected by bit j of the four coefficients of row n; word 0 carries weight
// -1 and is negated here, so the adder tree that follows only adds.
// Coefficient rows (cosine indices, dct_pkg::odd_k):
//   Z1:  C1  C3  C5  C7     Z3:  C3 -C7 -C1 -C5
//   Z5:  C5 -C1  C7  C3     Z7:  C7 -C5  C3 -C1
// WW must hold every word; for these rows at most three inputs are ever
// summed, so UW + 2 bits suffice.  Combinational.
module dao
  import dct_pkg::*;
#(
  parameter int UW = 10,        // input width
  parameter int WW = UW + 3,    // output word width
  parameter int Q  = DA_Q       // DA precision
) (
  input  logic signed [UW-1:0] b [4],
  output logic signed [WW-1:0] y [4][Q]  // y[n][j] for Z(2n+1), weight 2^-j
);

  localparam int IW = UW + 3;

  logic signed [IW-1:0] s   [4];
  logic signed [IW-1:0] sub [16];        // indexed by input subset mask

  for (genvar i = 0; i < 4; i++) begin : g_ext
    assign s[i] = IW'(b[i]);
  end

  assign sub[0]  = '0;
  assign sub[1]  = s[0];
  assign sub[2]  = s[1];
  assign sub[4]  = s[2];
  assign sub[8]  = s[3];
  assign sub[3]  = s[0] + s[1];
  assign sub[5]  = s[0] + s[2];
  assign sub[9]  = s[0] + s[3];
  assign sub[6]  = s[1] + s[2];
  assign sub[10] = s[1] + s[3];
  assign sub[12] = s[2] + s[3];
  assign sub[7]  = sub[3] + s[2];
  assign sub[11] = sub[3] + s[3];
  assign sub[13] = sub[5] + s[3];
  assign sub[14] = sub[6] + s[3];
  assign sub[15] = sub[3] + sub[12];

  for (genvar n = 0; n < 4; n++) begin : g_out
    for (genvar j = 0; j < Q; j++) begin : g_bit
      localparam int MASK = int'(coef_bit(coef(odd_k(n, 0), Q), j, Q))
                          + 2 * int'(coef_bit(coef(odd_k(n, 1), Q), j, Q))
                          + 4 * int'(coef_bit(coef(odd_k(n, 2), Q), j, Q))
                          + 8 * int'(coef_bit(coef(odd_k(n, 3), Q), j, Q));
      if (j == 0) begin : g_sign
        assign y[n][j] = WW'(-sub[MASK]);
      end else begin : g_pos
        assign y[n][j] = WW'(sub[MASK]);
      end
    end
  end

endmodule

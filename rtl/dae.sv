// dae: DA even processing element.
//
// Evaluates the 2x2 product [v0 v1] = [[K00 K01] [K10 K11]] * [u0 u1] in
// distributed-arithmetic form: a single adder forms u0 + u1, and for every
// output and every coefficient bit j the DA word y[n][j] is the sum of the
// inputs whose coefficient has bit j set, i.e. one of 0, u0, u1 or u0 + u1.
// Bit 0 of a coefficient has weight -1, so word 0 is negated here; the
// downstream adder tree then only adds.  v_n = sum_j y[n][j] * 2^-j with the
// coefficients as Q-bit fractions.  The coefficients are given as signed
// cosine indices (see dct_pkg).  Used twice in the 1-D DCT: for [Z0 Z4]
// from [A0 A1] and for [Z2 Z6] from [B0 B1].
// WW is the output word width; internal sums are kept at UW + 2 bits and
// narrowed to WW, which must hold every word (it does for the DCT
// matrices, where at most one input is ever negated).  Combinational.
module dae
  import dct_pkg::*;
#(
  parameter int UW  = 11,        // input width
  parameter int WW  = UW + 2,    // output word width
  parameter int Q   = DA_Q,      // DA precision
  parameter int K00 = EE_K00,
  parameter int K01 = EE_K01,
  parameter int K10 = EE_K10,
  parameter int K11 = EE_K11
) (
  input  logic signed [UW-1:0] u [2],
  output logic signed [WW-1:0] y [2][Q]   // y[n][j], weight 2^-j
);

  localparam int IW = UW + 2;

  logic signed [IW-1:0] sub [4];          // indexed by input subset mask

  assign sub[0] = '0;
  assign sub[1] = IW'(u[0]);
  assign sub[2] = IW'(u[1]);
  assign sub[3] = IW'(u[0]) + IW'(u[1]); // the element's only adder

  function automatic int kof(int n, int i);
    case (n * 2 + i)
      0:       return K00;
      1:       return K01;
      2:       return K10;
      default: return K11;
    endcase
  endfunction

  for (genvar n = 0; n < 2; n++) begin : g_out
    for (genvar j = 0; j < Q; j++) begin : g_bit
      localparam int MASK = int'(coef_bit(coef(kof(n, 0), Q), j, Q))
                          + 2 * int'(coef_bit(coef(kof(n, 1), Q), j, Q));
      if (j == 0) begin : g_sign
        assign y[n][j] = WW'(-sub[MASK]);
      end else begin : g_pos
        assign y[n][j] = WW'(sub[MASK]);
      end
    end
  end

endmodule

// ecat_comp: error-compensation circuit of the error-compensated adder tree.
//
// When Q shifted words are added and only the main part is kept, the bits
// that fall below the result LSB are split into TP_major (the first dropped
// column, weight 1/2 LSB, holding one bit from every word) and TP_minor (all
// lower columns).  TP_major is known exactly from the Q bits on tp_major;
// TP_minor is replaced by its expected value (Q - 2 + 2^(1-Q)) / 4 for
// uniformly distributed bits.  The bias added at the LSB is
// sigma = Round(TP_major + E[TP_minor]), which reduces, with S = popcount
// and k = Q / 4, to
//   Q < 4             : sigma = Round(S/2)         = (S + 1) >> 1
//   Q mod 4 in {0, 1} : sigma = (k-1) + Round(S/2 + 1/2) = k + (S >> 1)
//   Q mod 4 in {2, 3} : sigma = k + Round(S/2)     = k + ((S + 1) >> 1)
// The first two cases follow the source design's case formulas.  For the
// third case the source's formula prints (k-1) rather than k; k is used here
// because it is what the expected value of TP_minor gives and what reproduces
// the published error statistics (maximum error 1.5 LSB at P,Q = 12,6).
// The popcount is written behaviourally; synthesis maps it to a small
// full/half-adder counter as in the original circuit.  Purely combinational.
module ecat_comp #(
  parameter  int Q  = 9,
  localparam int SW = $clog2(Q / 4 + (Q + 1) / 2 + 1)
) (
  input  logic [Q-1:0]  tp_major,   // bit j = bit y_j(P-1-j) of word j
  output logic [SW-1:0] sigma       // compensation bias in result LSBs
);

  localparam int K  = Q / 4;
  localparam int CW = $clog2(Q + 1);

  logic [CW-1:0] s;

  always_comb begin
    s = '0;
    for (int j = 0; j < Q; j++) s = s + CW'(tp_major[j]);
  end

  if (Q < 4) begin : g_case1
    assign sigma = SW'(((CW + 1)'(s) + 1'b1) >> 1);
  end else if (Q % 4 < 2) begin : g_case2
    assign sigma = SW'(K) + SW'(s >> 1);
  end else begin : g_case3
    assign sigma = SW'(K) + SW'(((CW + 1)'(s) + 1'b1) >> 1);
  end

endmodule

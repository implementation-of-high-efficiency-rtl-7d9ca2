// ecat: error-compensated adder tree (ECAT), the shift-and-add stage of the
// DA datapath done in one combinational pass.
//
// It computes z ~= (1/2) * sum_j y_j * 2^-j for Q signed P-bit words y_j and
// returns the P-bit main part (MP) of that sum.  Word j is shifted right by
// j+1 places: its upper P-1-j bits (y_j >>> (j+1)) land in the main part,
// its bit j lands in the first truncated column (TP_major) and its bits j-1..0
// fall into the lower truncated columns (TP_minor).  The truncated columns are
// never added; the bias sigma from ecat_comp stands in for their carry into
// the main part, giving an error close to that of rounding the exact sum.
// The result is ready in one pass instead of the Q cycles of a serial
// shift-and-add.
//
// Tree shape, following the source's 12-bit, six-word example: sigma is
// added to the narrowest shifted word (and, for even Q, then to the next
// one); the remaining words are added in pairs (y0+y1, y2+y3, ...); the
// pair sums are then folded into that partial sum one after another, from
// the narrowest pair to the widest.  Every adder is only as wide as its
// operands need (wider operand + 1, at most P) and sign-extends its result,
// so the low-weight words use short adders.  At P=12, Q=6 this gives the
// 7, 8, 10, 11 and 12-bit adders of the source's example; other Q use the
// same rule.  There are Q adders in all.
// The extra factor 1/2 (word 0's LSB sits in the TP_major column) gives one
// bit of headroom; in the DCT it is the transform's own 1/2 scaling.
// Requires Q <= P.  Combinational, no clock.
module ecat #(
  parameter int P = 12,  // word length (main part width)
  parameter int Q = 9    // number of words (DA precision)
) (
  input  logic signed [P-1:0] y [Q],  // y[j] carries weight 2^-j
  output logic signed [P-1:0] z
);

  localparam int SW = $clog2(Q / 4 + (Q + 1) / 2 + 1);
  localparam bit QE = (Q % 2 == 0);          // sigma takes two words
  localparam int NG = QE ? Q / 2 - 1 : (Q - 1) / 2;  // word pairs
  localparam int GA = (NG > 0) ? NG : 1;

  // significant width of the shifted word j (sign included)
  function automatic int word_w(int j);
    return (P - 1 - j > 1) ? P - 1 - j : 1;
  endfunction

  // width of a sum of two operands of widths a and b
  function automatic int sum_w(int a, int b);
    int m;
    m = ((a > b) ? a : b) + 1;
    return (m < P) ? m : P;
  endfunction

  // sum of two P-bit values kept to w bits and sign-extended
  function automatic logic signed [P-1:0] add_w(logic signed [P-1:0] a,
                                                logic signed [P-1:0] b,
                                                int w);
    logic signed [P-1:0] s;
    s = a + b;
    return (s <<< (P - w)) >>> (P - w);
  endfunction

  localparam int WT1 = sum_w(SW + 1, word_w(Q - 1));
  localparam int WT  = QE ? sum_w(WT1, word_w(Q - 2)) : WT1;

  // width of the partial sum after folding in the n narrowest pairs
  function automatic int acc_w(int n);
    int w;
    w = WT;
    for (int i = 1; i <= n; i++)
      w = sum_w(w, sum_w(word_w(2 * (NG - i)), word_w(2 * (NG - i) + 1)));
    return w;
  endfunction

  logic [Q-1:0]        tp_major;
  logic [SW-1:0]       sigma;
  logic signed [P-1:0] mp   [Q];             // main parts
  logic signed [P-1:0] top1, top;            // sigma + narrowest word(s)
  logic signed [P-1:0] pr   [GA];            // pr[i] = mp[2i] + mp[2i+1]
  logic signed [P-1:0] acc  [NG+1];          // acc[n]: n pairs folded in

  for (genvar j = 0; j < Q; j++) begin : g_word
    assign tp_major[j] = y[j][j];
    assign mp[j]       = y[j] >>> (j + 1);
  end

  ecat_comp #(.Q(Q)) u_comp (
    .tp_major (tp_major),
    .sigma    (sigma)
  );

  assign top1 = add_w(P'(sigma), mp[Q-1], WT1);  // sigma is zero-extended

  if (QE) begin : g_top_even
    assign top = add_w(top1, mp[Q-2], WT);
  end else begin : g_top_odd
    assign top = top1;
  end

  if (NG == 0) begin : g_no_pair
    assign pr[0] = '0;
  end

  for (genvar i = 0; i < NG; i++) begin : g_pair
    assign pr[i] = add_w(mp[2*i], mp[2*i+1],
                         sum_w(word_w(2 * i), word_w(2 * i + 1)));
  end

  assign acc[0] = top;

  for (genvar n = 1; n <= NG; n++) begin : g_fold
    assign acc[n] = add_w(acc[n-1], pr[NG-n], acc_w(n));
  end

  assign z = acc[NG];

  initial assert (Q <= P) else $error("ecat: Q must not exceed P");

endmodule

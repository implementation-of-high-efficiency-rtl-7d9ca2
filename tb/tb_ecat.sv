// tb_ecat: random-word test of the error-compensated adder tree.
//
// Five trees are driven with uniformly random signed words: (P,Q) = (12,3),
// (12,6), (12,9), (12,12) and (8,6).  For every sample the exact value
// (1/2) sum_j y_j 2^-j is formed with 64-bit integers and the error of the
// tree output against it is measured.  Each error must stay inside the
// bound that the compensation scheme guarantees, and over the whole run the
// mean absolute error and the mean square error must match the published
// figures for the proposed scheme (0.2656/0.1016, 0.3789/0.2184,
// 0.3804/0.2222, 0.4738/0.3472; six 8-bit words: mse 0.218) within a small
// statistical tolerance.  The mean error of plain truncation of the same
// words is also measured as a sanity check of the reference.
module tb_ecat;

  localparam int NS = 20000;
  int checks = 0, failures = 0;

  logic signed [11:0] y3  [3];  logic signed [11:0] z3;
  logic signed [11:0] y6  [6];  logic signed [11:0] z6;
  logic signed [11:0] y9  [9];  logic signed [11:0] z9;
  logic signed [11:0] y12 [12]; logic signed [11:0] z12;
  logic signed [7:0]  y8  [6];  logic signed [7:0]  z8;

  ecat #(.P(12), .Q(3))  u3  (.y(y3),  .z(z3));
  ecat #(.P(12), .Q(6))  u6  (.y(y6),  .z(z6));
  ecat #(.P(12), .Q(9))  u9  (.y(y9),  .z(z9));
  ecat #(.P(12), .Q(12)) u12 (.y(y12), .z(z12));
  ecat #(.P(8),  .Q(6))  u8  (.y(y8),  .z(z8));

  real sum_abs [5], sum_sq [5], sum_trunc [5];

  // error of one sample: exact - got, exact in units of 2^-q
  function automatic real err_of(longint exact_scaled, int q, int got);
    return real'(exact_scaled) / (2.0 ** q) - real'(got);
  endfunction

  task automatic check_sample(int t, int q, longint ex, longint tr, int got, real bound);
    real e;
    e = err_of(ex, q, got);
    sum_abs[t]   += (e < 0.0) ? -e : e;
    sum_sq[t]    += e * e;
    sum_trunc[t] += real'(ex) / (2.0 ** q) - real'(tr);
    checks++;
    if (e > bound || e < -bound) begin
      failures++;
      if (failures < 10) $display("FAIL tree %0d: error %f exceeds %f", t, e, bound);
    end
  endtask

  task automatic check_stat(string name, real got, real exp, real tol);
    checks++;
    $display("%s = %f (published %f)", name, got, exp);
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s", name);
    end
  endtask

  initial begin
    longint ex, tr;
    for (int t = 0; t < 5; t++) begin
      sum_abs[t] = 0.0; sum_sq[t] = 0.0; sum_trunc[t] = 0.0;
    end
    for (int s = 0; s < NS; s++) begin
      foreach (y3[j])  y3[j]  = 12'($urandom);
      foreach (y6[j])  y6[j]  = 12'($urandom);
      foreach (y9[j])  y9[j]  = 12'($urandom);
      foreach (y12[j]) y12[j] = 12'($urandom);
      foreach (y8[j])  y8[j]  = 8'($urandom);
      #1;
      // exact sums scaled by 2^Q: sum_j y_j 2^(Q-1-j); truncation keeps floor parts
      ex = 0; tr = 0;
      foreach (y3[j]) begin ex += longint'(y3[j]) <<< (2 - j); tr += longint'(y3[j]) >>> (j + 1); end
      check_sample(0, 3, ex, tr, int'(z3), 0.625 + 1e-9);
      ex = 0; tr = 0;
      foreach (y6[j]) begin ex += longint'(y6[j]) <<< (5 - j); tr += longint'(y6[j]) >>> (j + 1); end
      check_sample(1, 6, ex, tr, int'(z6), 1.5 + 1e-9);
      ex = 0; tr = 0;
      foreach (y9[j]) begin ex += longint'(y9[j]) <<< (8 - j); tr += longint'(y9[j]) >>> (j + 1); end
      check_sample(2, 9, ex, tr, int'(z9), 2.002);
      ex = 0; tr = 0;
      foreach (y12[j]) begin ex += longint'(y12[j]) <<< (11 - j); tr += longint'(y12[j]) >>> (j + 1); end
      check_sample(3, 12, ex, tr, int'(z12), 3.0 + 1e-9);
      ex = 0; tr = 0;
      foreach (y8[j]) begin ex += longint'(y8[j]) <<< (5 - j); tr += longint'(y8[j]) >>> (j + 1); end
      check_sample(4, 6, ex, tr, int'(z8), 1.5 + 1e-9);
    end
    check_stat("mean |e| (12,3) ", sum_abs[0] / NS, 0.2656, 0.015);
    check_stat("mse      (12,3) ", sum_sq[0]  / NS, 0.1016, 0.010);
    check_stat("mean |e| (12,6) ", sum_abs[1] / NS, 0.3789, 0.015);
    check_stat("mse      (12,6) ", sum_sq[1]  / NS, 0.2184, 0.015);
    check_stat("mean |e| (12,9) ", sum_abs[2] / NS, 0.3804, 0.015);
    check_stat("mse      (12,9) ", sum_sq[2]  / NS, 0.2222, 0.015);
    check_stat("mean |e| (12,12)", sum_abs[3] / NS, 0.4738, 0.015);
    check_stat("mse      (12,12)", sum_sq[3]  / NS, 0.3472, 0.020);
    check_stat("mse      (8,6)  ", sum_sq[4]  / NS, 0.218,  0.015);
    check_stat("truncation mean error (12,6)", sum_trunc[1] / NS, 2.5078, 0.03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

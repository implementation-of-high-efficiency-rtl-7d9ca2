// tb_dct1d: 8-point DA-based 1-D DCT, row-pass (9-bit) and column-pass
// (12-bit) configurations.
//
// A new random vector is applied every clock.  One clock later z must hold
// its transform.  Two references are computed here:
//  * bit-level: Y = sum_m K(n,m) x_m with the 9-bit integer coefficients
//    K(n,m) = trunc(256 cos((2m+1) n pi/16)) (DC row: trunc(256 cos(pi/4)));
//    the output must lie within the compensation error bound of Y/512
//    (|e| <= 2.002 LSB for nine words);
//  * real-valued orthonormal DCT (1/2) c_n sum_m x_m cos((2m+1) n pi/16):
//    the output must be within sum_m |x_m| / 512 + 2.002 LSB (each 9-bit
//    coefficient is truncated by less than 1/256, plus the compensation
//    error).
// The mean absolute error against the real DCT is reported and must stay
// below 1.2 LSB.  The one-cycle latency is checked by comparing against
// the vector applied one clock earlier.
module tb_dct1d;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [8:0]   xa [8];
  logic signed [11:0]  za [8];
  logic signed [11:0]  xb [8];
  logic signed [14:0]  zb [8];

  dct1d #(.WI(9))  u_row (.clk(clk), .rst(rst), .x(xa), .z(za));
  dct1d #(.WI(12)) u_col (.clk(clk), .rst(rst), .x(xb), .z(zb));

  function automatic int kmat(int n, int m);
    real v;
    if (n == 0) v = 256.0 * $cos(3.14159265358979323846 / 4.0);
    else        v = 256.0 * $cos(real'((2 * m + 1) * n) * 3.14159265358979323846 / 16.0);
    return (v < 0.0) ? -$rtoi($floor(-v)) : $rtoi($floor(v));
  endfunction

  function automatic real rdct(int n, int xv [8]);
    real acc = 0.0;
    for (int m = 0; m < 8; m++)
      acc += real'(xv[m]) * $cos(real'((2 * m + 1) * n) * 3.14159265358979323846 / 16.0);
    return (n == 0) ? acc / (2.0 * $sqrt(2.0)) : acc / 2.0;
  endfunction

  real sum_abs_err = 0.0;
  int  n_err = 0;

  task automatic check_vec(string nm, int xv [8], longint zv [8]);
    longint y;
    real    e1, e2, bnd;
    bnd = 2.002;
    for (int m = 0; m < 8; m++) bnd += real'((xv[m] < 0) ? -xv[m] : xv[m]) / 512.0;
    for (int n = 0; n < 8; n++) begin
      y = 0;
      for (int m = 0; m < 8; m++) y += longint'(kmat(n, m)) * longint'(xv[m]);
      e1 = real'(y) / 512.0 - real'(zv[n]);
      e2 = rdct(n, xv) - real'(zv[n]);
      sum_abs_err += (e2 < 0.0) ? -e2 : e2;
      n_err++;
      checks += 2;
      if (e1 > 2.002 || e1 < -2.002) begin
        failures++;
        if (failures < 10) $display("FAIL %s Z%0d=%0d DA-exact %f", nm, n, zv[n], real'(y) / 512.0);
      end
      if (e2 > bnd || e2 < -bnd) begin
        failures++;
        if (failures < 10) $display("FAIL %s Z%0d=%0d DCT %f", nm, n, zv[n], rdct(n, xv));
      end
    end
  endtask

  initial begin
    int     pa [8], pb [8];
    longint qa [8], qb [8];
    foreach (xa[m]) begin xa[m] = '0; xb[m] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int s = 0; s < 3000; s++) begin
      case (s)
        0: foreach (xa[m]) begin xa[m] = -9'sd256; xb[m] = -12'sd2048; end
        1: foreach (xa[m]) begin xa[m] = 9'sd255;  xb[m] = 12'sd2047;  end
        2: foreach (xa[m]) begin xa[m] = m[0] ? -9'sd256 : 9'sd255; xb[m] = m[0] ? -12'sd724 : 12'sd724; end
        default: foreach (xa[m]) begin xa[m] = 9'($urandom); xb[m] = 12'($urandom); end
      endcase
      // the column pass sees values bounded by the row-pass output range
      if (s >= 3) foreach (xb[m]) xb[m] = 12'(int'(xb[m]) * 724 / 2048);
      foreach (xa[m]) begin pa[m] = int'(xa[m]); pb[m] = int'(xb[m]); end
      @(posedge clk);
      #1;
      foreach (za[n]) begin qa[n] = longint'(za[n]); qb[n] = longint'(zb[n]); end
      check_vec("row", pa, qa);
      check_vec("col", pb, qb);
    end
    checks++;
    $display("mean |error| vs real DCT = %f LSB", sum_abs_err / n_err);
    if (sum_abs_err / n_err > 1.2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

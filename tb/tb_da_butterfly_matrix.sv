// tb_da_butterfly_matrix: butterflies plus DA elements of the 1-D DCT.
//
// For 9-bit samples the nine 12-bit DA words of output Zn must recombine
// (word 0 weight -2^8, word j weight 2^(8-j)) into sum_m K(n,m) x_m with
// K(n,m) = trunc(256 cos((2m+1) n pi / 16)) for n > 0 and
// K(0,m) = trunc(256 cos(pi/4)) (the DC row carries the 1/sqrt(2) factor).
// This checks the butterfly signs, the even/odd split and the output order.
module tb_da_butterfly_matrix;

  int checks = 0, failures = 0;

  logic signed [8:0]  x [8];
  logic signed [11:0] y [8][9];

  da_butterfly_matrix #(.WI(9), .Q(9), .P(12)) dut (.x(x), .y(y));

  function automatic int kmat(int n, int m);
    real v;
    if (n == 0) v = 256.0 * $cos(3.14159265358979323846 / 4.0);
    else        v = 256.0 * $cos(real'((2 * m + 1) * n) * 3.14159265358979323846 / 16.0);
    return (v < 0.0) ? -$rtoi($floor(-v)) : $rtoi($floor(v));
  endfunction

  initial begin
    longint got, exp;
    for (int s = 0; s < 3000; s++) begin
      case (s)
        0: foreach (x[m]) x[m] = -9'sd256;
        1: foreach (x[m]) x[m] = 9'sd255;
        2: foreach (x[m]) x[m] = m[0] ? -9'sd256 : 9'sd255;
        3: foreach (x[m]) x[m] = m[0] ? 9'sd255 : -9'sd256;
        default: foreach (x[m]) x[m] = 9'($urandom);
      endcase
      #1;
      for (int n = 0; n < 8; n++) begin
        got = 0; exp = 0;
        for (int j = 0; j < 9; j++) got += longint'(y[n][j]) <<< (8 - j);
        for (int m = 0; m < 8; m++) exp += longint'(kmat(n, m)) * longint'(x[m]);
        checks++;
        if (got != exp) begin
          failures++;
          if (failures < 10) $display("FAIL Z%0d: %0d expected %0d", n, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

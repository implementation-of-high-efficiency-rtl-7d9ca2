// tb_dao: DA odd processing element.
//
// 10-bit inputs b0..b3 and 12-bit words, as in the 9-bit-input DCT.  The
// nine words of each output must recombine (word 0 weight -2^8, word j weight
// 2^(8-j)) into sum_i K_ni b_i, with the odd DCT rows
// Z1: C1 C3 C5 C7, Z3: C3 -C7 -C1 -C5, Z5: C5 -C1 C7 C3, Z7: C7 -C5 C3 -C1
// and Ck = trunc(256 cos(k pi/16)).  Here those rows are generated from
// cos((2m+1) n pi / 16) directly.  Random inputs plus all range corners.
module tb_dao;

  int checks = 0, failures = 0;

  logic signed [9:0]  b [4];
  logic signed [11:0] y [4][9];

  dao #(.UW(10), .WW(12), .Q(9)) dut (.b(b), .y(y));

  function automatic int kmat(int n, int m);   // output Z(2n+1), input b_m
    real v;
    v = 256.0 * $cos(real'((2 * m + 1) * (2 * n + 1)) * 3.14159265358979323846 / 16.0);
    return (v < 0.0) ? -$rtoi($floor(-v)) : $rtoi($floor(v));
  endfunction

  initial begin
    longint got, exp;
    for (int s = 0; s < 4000; s++) begin
      if (s < 16) begin
        for (int i = 0; i < 4; i++) b[i] = s[i] ? 10'sd510 : -10'sd512;
      end else begin
        for (int i = 0; i < 4; i++) b[i] = 10'($urandom);
      end
      #1;
      for (int n = 0; n < 4; n++) begin
        got = 0; exp = 0;
        for (int j = 0; j < 9; j++) got += longint'(y[n][j]) <<< (8 - j);
        for (int m = 0; m < 4; m++) exp += longint'(kmat(n, m)) * longint'(b[m]);
        checks++;
        if (got != exp) begin
          failures++;
          if (failures < 10) $display("FAIL Z%0d: %0d expected %0d", 2 * n + 1, got, exp);
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

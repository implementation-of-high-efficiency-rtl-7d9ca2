// tb_dae: DA even processing element, both DCT configurations.
//
// u_ee holds [[C4 C4] [C4 -C4]] (Z0, Z4 from A0, A1), u_eo holds
// [[C2 C6] [C6 -C2]] (Z2, Z6 from B0, B1), with 11-bit inputs and 12-bit
// words as in the 9-bit-input DCT.  The words must recombine, with weight
// -2^8 for word 0 and 2^(8-j) for word j, into the integer products
// sum_i K_i u_i, K = floor(256 cos(k pi/16)) computed here.  Random inputs
// plus the range corners are applied.
module tb_dae;

  int checks = 0, failures = 0;

  logic signed [10:0] uee [2], ueo [2];
  logic signed [11:0] yee [2][9], yeo [2][9];

  dae #(.UW(11), .WW(12), .Q(9), .K00(4), .K01(4), .K10(4), .K11(-4)) u_ee (.u(uee), .y(yee));
  dae #(.UW(11), .WW(12), .Q(9), .K00(2), .K01(6), .K10(6), .K11(-2)) u_eo (.u(ueo), .y(yeo));

  function automatic int kint(int k);
    real v;
    v = 256.0 * $cos(real'(k < 0 ? -k : k) * 3.14159265358979323846 / 16.0);
    return (k < 0) ? -$rtoi($floor(v)) : $rtoi($floor(v));
  endfunction

  // words of one output recombined: word j weighs 2^(8-j) (word 0 already negated)
  function automatic longint recombine(logic signed [11:0] w [9]);
    longint acc = 0;
    for (int j = 0; j < 9; j++) acc += longint'(w[j]) <<< (8 - j);
    return acc;
  endfunction

  task automatic check_out(string nm, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", nm, got, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 4000; s++) begin
      if (s < 16) begin
        uee[0] = s[0] ? 11'sd1020 : -11'sd1024;
        uee[1] = s[1] ? 11'sd1020 : -11'sd1024;
        ueo[0] = s[2] ? 11'sd1020 : -11'sd1024;
        ueo[1] = s[3] ? 11'sd1020 : -11'sd1024;
      end else begin
        uee[0] = 11'($urandom); uee[1] = 11'($urandom);
        ueo[0] = 11'($urandom); ueo[1] = 11'($urandom);
      end
      #1;
      check_out("Z0", recombine(yee[0]), kint(4) * longint'(uee[0]) + kint(4) * longint'(uee[1]));
      check_out("Z4", recombine(yee[1]), kint(4) * longint'(uee[0]) - kint(4) * longint'(uee[1]));
      check_out("Z2", recombine(yeo[0]), kint(2) * longint'(ueo[0]) + kint(6) * longint'(ueo[1]));
      check_out("Z6", recombine(yeo[1]), kint(6) * longint'(ueo[0]) - kint(2) * longint'(ueo[1]));
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

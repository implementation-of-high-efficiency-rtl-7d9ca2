// tb_ecat_comp: exhaustive check of the error-compensation circuit.
//
// For Q = 3, 4, 6, 9 and 12 every pattern of the Q TP_major bits is applied
// and sigma is compared with Round(S/2 + E), where S is the number of ones
// and E = (Q - 2 + 2^(1-Q)) / 4 is the expected value of the lower truncated
// columns, evaluated in floating point here.
module tb_ecat_comp;

  int checks = 0, failures = 0;

  logic [2:0]  t3;  logic [1:0] s3;
  logic [3:0]  t4;  logic [1:0] s4;
  logic [5:0]  t6;  logic [2:0] s6;
  logic [8:0]  t9;  logic [2:0] s9;
  logic [11:0] t12; logic [3:0] s12;

  ecat_comp #(.Q(3))  u3  (.tp_major(t3),  .sigma(s3));
  ecat_comp #(.Q(4))  u4  (.tp_major(t4),  .sigma(s4));
  ecat_comp #(.Q(6))  u6  (.tp_major(t6),  .sigma(s6));
  ecat_comp #(.Q(9))  u9  (.tp_major(t9),  .sigma(s9));
  ecat_comp #(.Q(12)) u12 (.tp_major(t12), .sigma(s12));

  function automatic int ref_sigma(int q, int s);
    real e;
    e = (real'(q) - 2.0 + 2.0 ** (1 - q)) / 4.0;
    return $rtoi($floor(real'(s) / 2.0 + e + 0.5));
  endfunction

  task automatic check(int q, int pat, int got);
    int exp;
    exp = ref_sigma(q, $countones(pat));
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL Q=%0d pattern=%h sigma=%0d expected %0d", q, pat, got, exp);
    end
  endtask

  initial begin
    for (int p = 0; p < (1 << 12); p++) begin
      t3 = 3'(p); t4 = 4'(p); t6 = 6'(p); t9 = 9'(p); t12 = 12'(p);
      #1;
      if (p < 8)    check(3, p, int'(s3));
      if (p < 16)   check(4, p, int'(s4));
      if (p < 64)   check(6, p, int'(s6));
      if (p < 512)  check(9, p, int'(s9));
      check(12, p, int'(s12));
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

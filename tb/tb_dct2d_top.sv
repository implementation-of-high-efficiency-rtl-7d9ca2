// tb_dct2d_top: end-to-end test of the 8x8 2-D DCT core at its default size.
//
// NB blocks of 8x8 9-bit samples are streamed one row per clock with no
// gaps, starting in the first clock after reset.  Block kinds: constant
// extremes (-256 and +255, which drive the DC term to the 12-bit range
// limits), a checkerboard of the extremes, smooth image-like ramps and
// uniform random noise.  For each block the orthonormal 2-D DCT
// F(u,v) = 1/4 c_u c_v sum_x sum_y f(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
// is computed here in floating point.  Output vector t of block k (Z_COL = t)
// must equal column v = t of F within an error bound worked out per block:
// a row-pass coefficient of row r is off by at most
// E1(r) = sum_m |f(r,m)| / 512 + 2.002 (coefficients truncated by less than
// 1/256, plus the adder-tree error), and the column pass adds at most
// 1/2 sum_r E1(r) + sum_r (|F1(r,t)| + E1(r)) / 512 + 2.002, where F1 is the
// ideal row transform.  Over all blocks the mean absolute error must stay
// below 2 LSB and the coefficient-domain PSNR (peak 255) above 40 dB.  The
// compensation bias of the row pass (2 LSB per coefficient when the dropped
// bits are all zero, as for flat rows) is summed by the column pass: a flat
// block shows about +7 LSB on F(0,v), v > 0.
// Timing: Z_VALID must first rise exactly 10 clocks after the first input
// row (the core's latency), and from then on every clock carries a vector.
// After NB blocks RST is pulsed in mid-stream and NB2 further blocks are
// sent; the restart must again give its first vector after 10 clocks.
// Mechanisms counted: blocks stored in row mode and in column mode of the
// transpose buffer (both must occur).  Activations of the output saturation
// guard are reported; with 9-bit inputs the column result stays inside the
// 12-bit range even for the extreme blocks, so the guard is not required to
// fire.
module tb_dct2d_top;

  localparam int NB  = 40;          // blocks before the mid-stream reset
  localparam int NB2 = 8;           // blocks after it
  localparam int NT  = NB + NB2;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic CLK = 0, RST = 1;
  always #5 CLK = ~CLK;

  logic signed [8:0]  X [8];
  logic signed [11:0] Z [8];
  logic               Z_VALID;
  logic [2:0]         Z_COL;

  dct2d_top dut (
    .CLK(CLK), .RST(RST),
    .X0(X[0]), .X1(X[1]), .X2(X[2]), .X3(X[3]),
    .X4(X[4]), .X5(X[5]), .X6(X[6]), .X7(X[7]),
    .Z0(Z[0]), .Z1(Z[1]), .Z2(Z[2]), .Z3(Z[3]),
    .Z4(Z[4]), .Z5(Z[5]), .Z6(Z[6]), .Z7(Z[7]),
    .Z_VALID(Z_VALID), .Z_COL(Z_COL)
  );

  int  img [NT][8][8];
  real ref_f [NT][8][8];
  real bound [NT][8];        // per block and output column t
  int  phase = 0;            // 0 before, 1 after the mid-stream reset
  int  restarts = 0;
  int  cycle = 0;
  int  first_valid = -1;
  int  n_out = 0;
  real sum_abs = 0.0, sum_sq = 0.0, max_err = 0.0;
  int  n_cmp = 0;
  int  row_mode_blocks = 0, col_mode_blocks = 0, sat_events = 0;

  function automatic int clip9(int v);
    return (v > 255) ? 255 : (v < -256) ? -256 : v;
  endfunction

  task automatic make_blocks();
    for (int b = 0; b < NT; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          case (b % 5)
            0: img[b][r][c] = (b == 0) ? -256 : (b == 5) ? 255 : clip9(int'($urandom_range(0, 511)) - 256);
            1: img[b][r][c] = ((r + c) % 2 == 1) ? -256 : 255;
            2: img[b][r][c] = clip9(-200 + 20 * r + 25 * c + int'($urandom_range(0, 8)));
            3: img[b][r][c] = clip9(int'($urandom_range(0, 255)) - 128);
            default: img[b][r][c] = clip9(100 - 30 * r + 10 * c * (r % 3));
          endcase
        end
    for (int b = 0; b < NT; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real acc = 0.0;
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++)
              acc += real'(img[b][r][c]) * $cos(real'((2 * r + 1) * u) * PI / 16.0)
                                         * $cos(real'((2 * c + 1) * v) * PI / 16.0);
          acc = acc / 4.0;
          if (u == 0) acc = acc / $sqrt(2.0);
          if (v == 0) acc = acc / $sqrt(2.0);
          ref_f[b][u][v] = acc;
        end
    for (int b = 0; b < NT; b++) begin
      real e1 [8];
      real f1;
      for (int r = 0; r < 8; r++) begin
        e1[r] = 2.002;
        for (int c = 0; c < 8; c++)
          e1[r] += real'((img[b][r][c] < 0) ? -img[b][r][c] : img[b][r][c]) / 512.0;
      end
      for (int t = 0; t < 8; t++) begin
        bound[b][t] = 2.002;
        for (int r = 0; r < 8; r++) begin
          f1 = 0.0;
          for (int c = 0; c < 8; c++)
            f1 += real'(img[b][r][c]) * $cos(real'((2 * c + 1) * t) * PI / 16.0);
          f1 = (t == 0) ? f1 / (2.0 * $sqrt(2.0)) : f1 / 2.0;
          bound[b][t] += e1[r] / 2.0 + (((f1 < 0.0) ? -f1 : f1) + e1[r]) / 512.0;
        end
      end
    end
  endtask

  // input side
  initial begin
    make_blocks();
    foreach (X[m]) X[m] = '0;
    repeat (3) @(posedge CLK);
    #1 RST = 0;
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 8; r++) begin
        foreach (X[m]) X[m] = 9'(img[b][r][m]);
        @(posedge CLK);
        #1;
      end
    // let three output vectors of the last block drain, then reset mid-stream
    foreach (X[m]) X[m] = 9'($urandom);
    repeat (5) @(posedge CLK);
    #1 RST = 1;
    repeat (2) @(posedge CLK);
    #1 RST = 0;
    phase = 1;
    for (int b = NB; b < NT; b++)
      for (int r = 0; r < 8; r++) begin
        foreach (X[m]) X[m] = 9'(img[b][r][m]);
        @(posedge CLK);
        #1;
      end
    foreach (X[m]) X[m] = '0;
  end

  // output side: sample just before each rising edge
  always @(negedge CLK) begin
    if (RST) begin
      if (first_valid >= 0) begin
        restarts++;
        checks++;
        if (n_out < NB * 8 - 5) begin
          failures++;
          $display("FAIL only %0d vectors before the mid-stream reset", n_out);
        end
      end
      first_valid = -1;
      cycle = 0;
      n_out = 0;
    end else begin
      if (dut.u_tbuf.idx == 3'd0) begin
        if (dut.u_tbuf.mode) col_mode_blocks++;
        else                 row_mode_blocks++;
      end
      if (Z_VALID && first_valid < 0) begin
        first_valid = cycle;
        checks++;
        if (cycle != 10) begin
          failures++;
          $display("FAIL first output %0d clocks after the first row, expected 10", cycle);
        end
      end
      if (first_valid >= 0) begin
        int b, t;
        b = n_out / 8 + ((phase == 1) ? NB : 0);
        t = n_out % 8;
        checks++;
        if (!Z_VALID || Z_COL != 3'(t)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: valid=%0d col=%0d expected col %0d", cycle, Z_VALID, Z_COL, t);
        end
        if (b < ((phase == 1) ? NT : NB) && !(phase == 0 && n_out >= NB * 8 - 5)) begin
          for (int u = 0; u < 8; u++) begin
            real e;
            e = real'(Z[u]) - ref_f[b][u][t];
            if (Z[u] == 12'sh7ff || Z[u] == -12'sh800) begin
              if (dut.z2[u] > 15'sh7ff || dut.z2[u] < -15'sh800) sat_events++;
            end
            n_cmp++;
            sum_abs += (e < 0.0) ? -e : e;
            sum_sq  += e * e;
            if (((e < 0.0) ? -e : e) > max_err) max_err = (e < 0.0) ? -e : e;
            checks++;
            if (e > bound[b][t] || e < -bound[b][t]) begin
              failures++;
              if (failures < 10)
                $display("FAIL block %0d F(%0d,%0d) = %0d expected %f", b, u, t, Z[u], ref_f[b][u][t]);
            end
          end
        end
        n_out++;
      end
      cycle++;
    end
  end

  initial begin
    real mse, psnr;
    wait (phase == 1 && n_out == NB2 * 8);
    @(posedge CLK);
    mse  = sum_sq / real'(n_cmp);
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("coefficients compared %0d: mean |e| = %f, max |e| = %f, PSNR = %f dB",
             n_cmp, sum_abs / real'(n_cmp), max_err, psnr);
    $display("row-mode blocks %0d, column-mode blocks %0d, saturation events %0d",
             row_mode_blocks, col_mode_blocks, sat_events);
    checks += 4;
    if (sum_abs / real'(n_cmp) > 2.0) failures++;
    if (restarts != 1) begin
      failures++;
      $display("FAIL mid-stream reset not seen");
    end
    if (psnr < 40.0) failures++;
    if (row_mode_blocks == 0 || col_mode_blocks == 0) begin
      failures++;
      $display("FAIL a transpose mode never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NT * 8 + 80) * 10 * 1.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

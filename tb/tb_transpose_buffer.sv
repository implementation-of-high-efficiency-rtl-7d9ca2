// tb_transpose_buffer: streaming 8x8 transpose.
//
// Six random 8x8 blocks of 12-bit words are written one row per clock
// without gaps, starting right after reset.  From the ninth clock on, dout
// must present, one per clock, the columns of the previous block: in the
// clock in which row t of block k+1 is on din, dout[r] must equal element
// (r, t) of block k.  rd_valid must be low for the first 8 clocks and high
// afterwards, and both storage modes (row lines and column lines) must be
// used.
module tb_transpose_buffer;

  localparam int NB = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [11:0] din [8], dout [8];
  logic               rd_valid, mode;
  logic [2:0]         idx;

  transpose_buffer #(.W(12)) dut (
    .clk(clk), .rst(rst), .din(din), .dout(dout),
    .rd_valid(rd_valid), .mode(mode), .idx(idx)
  );

  logic signed [11:0] blk [NB+1][8][8];
  int mode_cycles [2] = '{0, 0};

  initial begin
    for (int b = 0; b <= NB; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) blk[b][r][c] = 12'($urandom);
    foreach (din[k]) din[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b <= NB; b++) begin
      for (int t = 0; t < 8; t++) begin
        foreach (din[k]) din[k] = blk[b][t][k];
        #1;
        mode_cycles[mode]++;
        checks++;
        if (idx != 3'(t)) begin
          failures++;
          $display("FAIL idx=%0d expected %0d", idx, t);
        end
        checks++;
        if (rd_valid != (b > 0)) begin
          failures++;
          $display("FAIL rd_valid=%0d in block %0d", rd_valid, b);
        end
        if (b > 0) begin
          for (int r = 0; r < 8; r++) begin
            checks++;
            if (dout[r] != blk[b-1][r][t]) begin
              failures++;
              if (failures < 10)
                $display("FAIL block %0d column %0d row %0d: %0d expected %0d",
                         b - 1, t, r, dout[r], blk[b-1][r][t]);
            end
          end
        end
        @(posedge clk);
        #1;
      end
    end
    checks++;
    if (mode_cycles[0] == 0 || mode_cycles[1] == 0) begin
      failures++;
      $display("FAIL a storage mode was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

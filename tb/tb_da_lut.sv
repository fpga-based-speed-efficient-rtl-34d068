// tb_da_lut: checks the DA look-up table.
// 1) A 4-input table with the example coefficients 0.45, -0.65, 0.15, 0.55
//    (scaled by 100) against a hand-written list of all 16 partial sums.
// 2) The 8-input table of the decimator's third partition (taps 16..23 of
//    the even-phase coefficient set) against sums formed in the testbench.
module tb_da_lut;
  localparam logic signed [15:0] EX [4] = '{16'sd45, -16'sd65, 16'sd15, 16'sd55};
  // Expected words for addresses 0..15 (address bit 0 selects the first coefficient)
  localparam int EXP [16] = '{0, 45, -65, -20, 15, 60, -50, -5,
                              55, 100, -10, 35, 70, 115, 5, 50};
  int checks = 0, failures = 0;

  logic [3:0]         a4;
  logic signed [17:0] d4;
  logic [7:0]         a8;
  logic signed [18:0] d8;

  da_lut #(.K(4), .COEF_W(16), .COEFS(EX)) u4 (.addr(a4), .data(d4));
  da_lut #(.K(8), .COEF_W(16), .NC(decim_pkg::N_EVEN), .BASE(16),
           .COEFS(decim_pkg::H_EVEN)) u8 (.addr(a8), .data(d8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      a4 = 4'(a);
      #1;
      checks++;
      if (int'(d4) != EXP[a]) begin
        failures++;
        $display("K=4 addr %0d: got %0d expected %0d", a, d4, EXP[a]);
      end
    end
    for (int a = 0; a < 256; a++) begin
      int s;
      s = 0;
      if ((a & 1) != 0)   s += 10386;
      if ((a & 2) != 0)   s += 10386;
      if ((a & 4) != 0)   s += -3346;
      if ((a & 8) != 0)   s += 1875;
      if ((a & 16) != 0)  s += -1208;
      if ((a & 32) != 0)  s += 817;
      if ((a & 64) != 0)  s += -560;
      if ((a & 128) != 0) s += 382;
      a8 = 8'(a);
      #1;
      checks++;
      if (int'(d8) != s) begin
        failures++;
        $display("K=8 addr %0d: got %0d expected %0d", a, d8, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

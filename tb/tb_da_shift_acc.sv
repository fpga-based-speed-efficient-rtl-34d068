// tb_da_shift_acc: drives 200 random words of 16 LUT values through the
// shift-accumulator (LSB first, sign bit subtracted) and compares the
// result with sum_{b<15} A_b 2^b - A_15 2^15 worked out in 64-bit integers.
module tb_da_shift_acc;
  localparam int IN_W = 22, DATA_W = 16, ACC_W = IN_W + DATA_W;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, first = 0, sub = 0;
  logic signed [IN_W-1:0]  a = '0;
  logic signed [ACC_W-1:0] acc;

  da_shift_acc #(.IN_W(IN_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 200; w++) begin
      automatic longint expect_v = 0;
      for (int b = 0; b < DATA_W; b++) begin
        logic signed [IN_W-1:0] v;
        v = (w % 4 == 0) ? ((b % 2 != 0) ? -(1 <<< (IN_W-1)) : (1 <<< (IN_W-1)) - 1)
                         : IN_W'($urandom);
        @(negedge clk);
        en = 1; first = (b == 0); sub = (b == DATA_W-1); a = v;
        if (b == DATA_W-1) expect_v -= longint'(v) <<< b;
        else               expect_v += longint'(v) <<< b;
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (longint'(acc) != expect_v) begin
        failures++;
        $display("word %0d: got %0d expected %0d", w, acc, expect_v);
      end
      // idle clocks must not disturb the result
      @(negedge clk);
      checks++;
      if (longint'(acc) != expect_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

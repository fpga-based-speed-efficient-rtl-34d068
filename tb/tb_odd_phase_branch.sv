// tb_odd_phase_branch: random loads and captures; on every capture the
// term must equal the odd-phase sample loaded DELAY loads before the most
// recent one, times 2^SHIFT (0.5 in the full-precision scale).
module tb_odd_phase_branch;
  localparam int DW = 16, DELAY = 16, SHIFT = 14, OW = 38;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, capture = 0;
  logic signed [DW-1:0] in_data = '0;
  logic signed [OW-1:0] term;
  longint hist [DELAY+1];
  longint expect_v = 0;

  odd_phase_branch #(.DATA_W(DW), .DELAY(DELAY), .SHIFT(SHIFT), .OUT_W(OW)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= DELAY; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      automatic int r = $urandom % 4;
      @(negedge clk);
      load = 0; capture = 0;
      if (r < 2) begin
        load = 1; in_data = DW'($urandom);
        for (int k = DELAY; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(in_data);
      end else if (r == 2) begin
        capture = 1;
        expect_v = hist[DELAY] <<< SHIFT;
      end
      @(negedge clk);
      load = 0; capture = 0;
      checks++;
      if (longint'(term) != expect_v) begin
        failures++;
        $display("step %0d: term %0d expected %0d", i, term, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_da_fir: checks the 34-tap bit-serial DA section at its default size.
// Random samples (including full-scale extremes) are offered with random
// gaps; every result is compared with sum_k h[k] x[n-k] computed by
// multiplication in the testbench from the even-phase coefficients. Also
// checked: the result arrives DATA_W+1 clocks after the sample is taken,
// and in_ready is low for the DATA_W clocks of the computation.
module tb_da_fir;
  localparam int N = decim_pkg::N_EVEN;
  localparam int DW = decim_pkg::DATA_W;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [DW-1:0] in_data = '0;
  logic signed [decim_pkg::ACC_W-1:0] out_data;
  longint hist [N];
  longint expect_q [$];
  int     take_time [$];
  int     cyc = 0;

  da_fir #(.L_W(decim_pkg::LUT_W), .S_W(decim_pkg::SUM_W), .A_W(decim_pkg::ACC_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and timing check
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      automatic longint s = 0;
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(in_data);
      for (int k = 0; k < N; k++) s += longint'(decim_pkg::H_EVEN[k]) * hist[k];
      expect_q.push_back(s);
      take_time.push_back(cyc);
    end
    if (out_valid) begin
      automatic longint e = expect_q.pop_front();
      automatic int t = take_time.pop_front();
      checks += 2;
      if (longint'(out_data) != e) begin
        failures++;
        $display("result: got %0d expected %0d", out_data, e);
      end
      if (cyc - t != DW + 1) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t, DW + 1);
      end
    end
  end

  int busy_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) busy_run++;
    else begin
      if (busy_run != 0) begin
        checks++;
        if (busy_run != DW) begin
          failures++;
          $display("in_ready low for %0d clocks", busy_run);
        end
      end
      busy_run = 0;
    end
  end

  initial begin
    for (int k = 0; k < N; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      logic signed [DW-1:0] v;
      case (i % 5)
        0: v = 16'sh7fff;
        1: v = 16'sh8000;
        default: v = DW'($urandom);
      endcase
      if (i >= 150 && i < 190) v = (i % 2 != 0) ? 16'sh8000 : 16'sh7fff;
      @(negedge clk);
      in_valid = 1; in_data = v;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom % 20) @(negedge clk);
    end
    repeat (DW + 4) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("%0d results missing", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

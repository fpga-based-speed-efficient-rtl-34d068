// tb_decim_freq_response: magnitude response of the decimator, measured at
// the reference design's operating point: one input sample every
// 63.857 MHz / 48 kHz = 1330.4 clocks (sample n is offered at clock
// n * 1330.4), with the top at its default size.
//
// For each test tone (amplitude 0.5 full scale) 560 input samples are fed.
// The first 40 outputs are dropped while the filter fills. Over the next
// 240 outputs the tone's amplitude is measured by correlation with sine
// and cosine at the tone frequency: A = 2/N sqrt(S^2 + C^2), with an
// integer number of periods since all tones are multiples of 100 Hz.
// Expected, from the filter's design: pass-band tones (1, 5, 9 kHz) come
// out with gain 1 within 0.2 %. Stop-band tones (15, 18, 22 kHz, which
// alias to 9, 6 and 2 kHz) stay below -70 dB, i.e. amplitude under 5.2 LSB
// here. At this input rate in_ready must never stall the source, and
// outputs must come at exactly half the input rate.
module tb_decim_freq_response;
  localparam real PI = 3.14159265358979;
  localparam real FS = 48000.0;
  localparam real FCLK = 63.857e6;
  localparam real CLK_PER_SAMPLE = FCLK / FS;   // about 1330.4 clocks
  localparam int  N_TONES = 6;
  localparam real TONE [N_TONES] = '{1000.0, 5000.0, 9000.0, 15000.0, 18000.0, 22000.0};
  localparam int  N_FILL = 40, N_MEAS = 240;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_sat;
  logic signed [15:0] in_data = '0, out_data;
  longint out_log [$];
  int n_stall = 0, n_in = 0;

  da_decimator dut (.*);

  always #5 clk = !clk;

  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (out_valid) out_log.push_back(longint'(out_data));
    if (in_valid && !in_ready) n_stall++;
  end

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < N_TONES; t++) begin
      real s, c, amp, gain;
      int first_in;
      out_log.delete();
      first_in = n_in;
      for (int i = 0; i < 2 * (N_FILL + N_MEAS); i++) begin
        @(negedge clk);
        while (real'(cyc) < real'(n_in) * CLK_PER_SAMPLE) @(negedge clk);
        in_valid = 1;
        in_data = 16'($rtoi(16384.0 * $sin(2.0 * PI * TONE[t] * real'(i) / FS)));
        @(negedge clk);
        in_valid = 0;
        n_in++;
      end
      repeat (40) @(negedge clk);
      checks++;
      if (out_log.size() != N_FILL + N_MEAS) begin
        failures++;
        $display("%0.0f Hz: %0d outputs for %0d inputs", TONE[t], out_log.size(), n_in - first_in);
      end
      s = 0.0;
      c = 0.0;
      for (int m = N_FILL; m < N_FILL + N_MEAS; m++) begin
        automatic real ph = 2.0 * PI * TONE[t] * real'(2 * m) / FS;
        s += real'(out_log[m]) * $sin(ph);
        c += real'(out_log[m]) * $cos(ph);
      end
      amp = 2.0 / real'(N_MEAS) * $sqrt(s * s + c * c);
      gain = amp / 16384.0;
      $display("%6.0f Hz: output amplitude %9.3f LSB, gain %9.6f (%7.2f dB)",
               TONE[t], amp, gain, 20.0 * $log10(gain + 1.0e-12));
      checks++;
      if (TONE[t] < 12000.0) begin
        if (gain < 0.998 || gain > 1.002) begin
          failures++;
          $display("pass-band gain out of range");
        end
      end else if (gain > 3.16e-4) begin
        failures++;
        $display("stop-band attenuation below 70 dB");
      end
    end
    checks++;
    if (n_stall != 0) begin
      failures++;
      $display("%0d stalls at the 48 kHz input rate", n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

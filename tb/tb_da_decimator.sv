// tb_da_decimator: end-to-end test of the decimator at its default size.
//
// Reference: the 67-tap filter in direct form, y[m] = sum_n h[n] x[2m-n],
// with h[2k] the even-phase coefficients, h[33] = 0.5 and every other
// odd-indexed h zero, computed by multiplication, then rounded half up to
// 16 bits and clipped. Every output is compared bit for bit, and its
// latency (DATA_W+2 clocks after the even sample is taken) is checked.
// Input sequences, at a 48 kHz sample rate:
//   impulse  - one full-scale sample: the outputs are the even-indexed
//              coefficients
//   step     - a full-scale step: the overshoot of the response must clip
//   tone_pass- 2 kHz sine, amplitude 0.5: must come out delayed, gain 1
//   tone_stop- 18 kHz sine, amplitude 0.5: must be suppressed (< -70 dB)
//   random   - random samples, some offered back to back to force stalls
// Mechanisms counted (each must occur): even and odd samples, outputs,
// input stalls while the DA section is busy, saturated outputs.
module tb_da_decimator;
  localparam int DW = decim_pkg::DATA_W;
  localparam int NT = decim_pkg::NTAPS;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_sat;
  logic signed [DW-1:0] in_data = '0, out_data;

  longint h [NT];
  longint xh [NT];          // input history, xh[0] newest
  longint exp_q [$];
  logic   exp_sat_q [$];
  int     take_q [$];
  int     cyc = 0, nin = 0;
  int     n_even = 0, n_odd = 0, n_out = 0, n_stall = 0, n_sat = 0;

  // per-sequence output statistics
  longint last_out;
  longint peak_abs;
  longint out_log [$];

  da_decimator dut (.*);

  always #5 clk = !clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint round_clip(longint s, output logic sat);
    longint r = (s + (64'sd1 <<< 14)) >>> 15;
    sat = 1'b0;
    if (r > 32767)  begin r = 32767;  sat = 1'b1; end
    if (r < -32768) begin r = -32768; sat = 1'b1; end
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready) begin
      for (int k = NT-1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = longint'(in_data);
      if (nin % 2 == 0) begin
        automatic longint s = 0;
        automatic logic sat;
        for (int n = 0; n < NT; n++) s += h[n] * xh[n];
        exp_q.push_back(round_clip(s, sat));
        exp_sat_q.push_back(sat);
        take_q.push_back(cyc);
        n_even++;
      end else n_odd++;
      nin++;
    end
    if (out_valid) begin
      automatic longint e = exp_q.pop_front();
      automatic logic es = exp_sat_q.pop_front();
      automatic int t = take_q.pop_front();
      n_out++;
      if (out_sat) n_sat++;
      checks += 2;
      if (longint'(out_data) != e || out_sat != es) begin
        failures++;
        $display("output %0d: got %0d sat %0b, expected %0d sat %0b", n_out, out_data, out_sat, e, es);
      end
      if (cyc - t != DW + 2) begin
        failures++;
        $display("output %0d: latency %0d, expected %0d", n_out, cyc - t, DW + 2);
      end
      last_out = longint'(out_data);
      if ((last_out < 0 ? -last_out : last_out) > peak_abs)
        peak_abs = last_out < 0 ? -last_out : last_out;
      out_log.push_back(last_out);
    end
  end

  // Offer one sample; gap = idle clocks after it is taken
  task automatic send(input logic signed [DW-1:0] v, input int gap);
    @(negedge clk);
    in_valid = 1; in_data = v;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic drain();
    repeat (3 * DW) @(negedge clk);
  endtask

  task automatic clear_stats();
    peak_abs = 0;
    out_log.delete();
  endtask

  initial begin
    for (int n = 0; n < NT; n++) begin
      h[n] = 0;
      xh[n] = 0;
    end
    for (int k = 0; k < decim_pkg::N_EVEN; k++) h[2*k] = longint'(decim_pkg::H_EVEN[k]);
    h[33] = 16384;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // impulse: output m is h[2m] * 32767/32768, which rounds back to the
    // even-phase coefficient e0[m]; the 0.5 centre tap sits at the odd
    // index 33 and is not among the kept samples
    clear_stats();
    send(16'sh7fff, 3);
    for (int i = 1; i < 80; i++) send(16'sd0, 3);
    drain();
    checks++;
    if (out_log.size() != 40) failures++;
    for (int k = 0; k < 40; k++) begin
      checks++;
      if (out_log[k] != ((k < decim_pkg::N_EVEN) ? longint'(decim_pkg::H_EVEN[k]) : 0)) begin
        failures++;
        $display("impulse response, output %0d: %0d", k, out_log[k]);
      end
    end

    // step from 0 to full scale: settles at full scale; overshoot clips
    clear_stats();
    for (int i = 0; i < 100; i++) send(16'sh7fff, 2);
    drain();
    checks++;
    if (out_log[out_log.size()-1] < 32760) begin
      failures++;
      $display("step does not settle at full scale: %0d", out_log[out_log.size()-1]);
    end
    for (int i = 0; i < 100; i++) send(-16'sh7fff, 2);
    for (int i = 0; i < 80; i++) send(16'sd0, 2);
    drain();

    // pass-band tone, 2 kHz at 48 kHz, amplitude 0.5: once the filter has
    // filled, output m must equal the input tone delayed by the filter's
    // 33-sample group delay, 16384 sin(2 pi f (2m - 33) / 48 kHz), to
    // within a few LSB
    clear_stats();
    for (int i = 0; i < 400; i++) send(DW'($rtoi(16384.0 * $sin(2.0 * PI * 2000.0 * i / 48000.0))), 1);
    drain();
    peak_abs = 0;
    for (int i = 40; i < out_log.size(); i++) begin
      automatic longint ideal = longint'($rtoi(16384.0 * $sin(2.0 * PI * 2000.0 * (2 * i - 33) / 48000.0)));
      automatic longint d = out_log[i] - ideal;
      if ((d < 0 ? -d : d) > peak_abs) peak_abs = d < 0 ? -d : d;
    end
    checks++;
    if (out_log.size() != 200 || peak_abs > 4) begin
      failures++;
      $display("2 kHz tone: %0d outputs, largest error %0d LSB", out_log.size(), peak_abs);
    end

    // stop-band tone, 18 kHz: after the filter has filled, below -70 dB
    clear_stats();
    for (int i = 0; i < 400; i++) send(DW'($rtoi(16384.0 * $sin(2.0 * PI * 18000.0 * i / 48000.0))), 1);
    drain();
    peak_abs = 0;
    for (int i = 40; i < out_log.size(); i++)
      if ((out_log[i] < 0 ? -out_log[i] : out_log[i]) > peak_abs)
        peak_abs = out_log[i] < 0 ? -out_log[i] : out_log[i];
    checks++;
    if (peak_abs > 5) begin
      failures++;
      $display("18 kHz tone: output peak %0d, expected near 0", peak_abs);
    end

    // random samples, about half offered back to back (forces stalls)
    for (int i = 0; i < 2000; i++) send(DW'($urandom), ($urandom % 2 != 0) ? 0 : $urandom % 30);
    drain();

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("even samples %0d, odd samples %0d, outputs %0d, stalls %0d, saturated %0d",
             n_even, n_odd, n_out, n_stall, n_sat);
    checks += 5;
    if (n_even == 0) failures++;
    if (n_odd == 0) failures++;
    if (n_out == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

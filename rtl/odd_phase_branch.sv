// odd_phase_branch: the odd polyphase section of the half-band decimator.
//
// The odd section holds the 33 odd-indexed coefficients h[1], h[3], ...,
// h[65]. In a half-band filter all of them are zero except the centre
// coefficient h[33] = 0.5, which is odd-phase coefficient number 16. The
// section therefore reduces to a delay line of odd-phase samples and a
// one-place shift: no multiplier and no look-up table. The half-band
// structure and the 33-coefficient split follow the source design; doing
// the centre tap as a shift is this design's choice.
//
// Interface: `load` shifts in_data into the delay line (line[0] newest).
// `capture` (given when the matching even-phase sample is taken) latches
// line[DELAY] * 2^SHIFT into `term`, which holds until the next capture.
// With SHIFT = COEF_FRAC-1 the term has the scale of the DA section's
// full-precision result (0.5 in Q1.15 is 2^14), so its SHIFT low bits are
// always zero. load and capture are never given in the same clock.
// Synchronous active-low reset clears everything.
module odd_phase_branch #(
  parameter int DATA_W = decim_pkg::DATA_W,
  parameter int DELAY = decim_pkg::ODD_CENTER,
  parameter int SHIFT = decim_pkg::COEF_FRAC - 1,
  parameter int OUT_W = decim_pkg::ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     capture,
  output logic signed [OUT_W-1:0]  term
);

  logic signed [DATA_W-1:0] line [DELAY+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= DELAY; i++) line[i] <= '0;
      term <= '0;
    end else begin
      if (load) begin
        line[0] <= in_data;
        for (int i = 1; i <= DELAY; i++) line[i] <= line[i-1];
      end
      if (capture)
        term <= OUT_W'(line[DELAY]) <<< SHIFT;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(load && capture));

endmodule

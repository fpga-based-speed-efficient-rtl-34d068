// round_sat: output stage of the decimator.
//
// Adds the even-phase (DA) and odd-phase (centre tap) results, both in the
// full-precision scale 2^FRAC per unit, rounds the sum to OUT_W bits
// (round half up: add 2^(FRAC-1), then shift right by FRAC) and saturates
// to the signed OUT_W range. With Q1.15 data and coefficients, FRAC = 15
// and OUT_W = 16 give a Q1.15 output. The 16-bit output precision follows
// the source design; rounding and saturation are this design's choices
// (the filter's step response overshoots by about 7 %, so a full-scale
// input can exceed the output range).
//
// Timing: registered; out_valid and out_data follow in_valid by one clock.
// Synchronous active-low reset.
module round_sat #(
  parameter int IN_W = decim_pkg::ACC_W,
  parameter int FRAC = decim_pkg::COEF_FRAC,
  parameter int OUT_W = decim_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  a,
  input  logic signed [IN_W-1:0]  b,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    saturated   // out_data was clipped
);

  localparam int SUM_W = IN_W + 1;
  localparam logic signed [SUM_W-1:0] HALF = SUM_W'(1) <<< (FRAC - 1);
  localparam logic signed [SUM_W-FRAC-1:0] MAXV = (SUM_W-FRAC)'(2**(OUT_W-1) - 1);
  localparam logic signed [SUM_W-FRAC-1:0] MINV = -(SUM_W-FRAC)'(2**(OUT_W-1));

  logic signed [SUM_W-1:0]      sum;
  logic signed [SUM_W-FRAC-1:0] rounded;
  logic signed [OUT_W-1:0]      clipped;
  logic                         clip;

  always_comb begin
    sum     = SUM_W'(a) + SUM_W'(b) + HALF;
    rounded = sum[SUM_W-1:FRAC];
    clip    = (rounded > MAXV) || (rounded < MINV);
    if (rounded > MAXV)      clipped = MAXV[OUT_W-1:0];
    else if (rounded < MINV) clipped = MINV[OUT_W-1:0];
    else                     clipped = rounded[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      saturated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data  <= clipped;
        saturated <= clip;
      end
    end
  end

endmodule

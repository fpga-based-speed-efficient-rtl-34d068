// da_decimator: multiplier-less half-band decimator by 2 using distributed
// arithmetic.
//
// A 67-tap (order 66) equiripple half-band low-pass filter is followed by
// keeping every second sample. Written in polyphase form, only the outputs
// that are kept are computed, at half the input rate:
//   y[m] = sum_{k=0..33} h[2k] x[2m-2k]  +  0.5 x[2m-33]
// The first sum (even phase, 34 coefficients) is evaluated by bit-serial
// distributed arithmetic with five look-up tables of 8, 8, 8, 8 and 2
// inputs (da_fir). The second (odd phase, 33 coefficients of which only the
// centre one, 0.5, is non-zero) is a delay line and a shift
// (odd_phase_branch). polyphase_commutator deals the input samples to the
// two phases; round_sat adds the two results and rounds them to 16 bits.
// Structure, order, half-band type, coefficient split and LUT partitioning
// follow the source design. The coefficient values (decim_pkg), the
// handshake, the rounding and the timing are this design's own.
//
// Interface: 16-bit signed Q1.15 samples in and out. An input sample is
// taken when in_valid && in_ready. Every sample taken on the even phase
// (the 1st, 3rd, 5th, ... after reset) starts one output. in_ready drops
// for DATA_W clocks while the DA section works, so the input rate can be at
// most 2 samples per DATA_W+1 clocks. out_valid pulses for one clock
// DATA_W+2 clocks after the even sample was taken; out_data holds until
// the next output. out_sat flags an output clipped to the 16-bit range.
// Synchronous active-low reset clears all sample history.
module da_decimator (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  output logic                             in_ready,
  input  logic signed [decim_pkg::DATA_W-1:0] in_data,
  output logic                             out_valid,
  output logic signed [decim_pkg::DATA_W-1:0] out_data,
  output logic                             out_sat
);

  import decim_pkg::*;

  logic                    even_ready, even_load, odd_load;
  logic                    da_valid;
  logic signed [ACC_W-1:0] da_result, odd_term;

  polyphase_commutator u_comm (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .even_ready (even_ready),
    .even_load  (even_load),
    .odd_load   (odd_load),
    .phase      ()
  );

  da_fir #(.L_W(LUT_W), .S_W(SUM_W), .A_W(ACC_W)) u_even (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (even_load),
    .in_ready  (even_ready),
    .in_data   (in_data),
    .out_valid (da_valid),
    .out_data  (da_result)
  );

  odd_phase_branch u_odd (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (odd_load),
    .in_data (in_data),
    .capture (even_load),
    .term    (odd_term)
  );

  round_sat u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (da_valid),
    .a         (da_result),
    .b         (odd_term),
    .out_valid (out_valid),
    .out_data  (out_data),
    .saturated (out_sat)
  );

  // Input handshake rule: an offered sample stays offered, unchanged,
  // until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready |=> in_valid && $stable(in_data));

endmodule

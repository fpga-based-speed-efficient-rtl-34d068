// polyphase_commutator: input switch of the decimate-by-2 polyphase filter.
//
// Accepted input samples are dealt alternately to the even phase (the DA
// section, x[2m]) and the odd phase (the centre-tap section, x[2m-1]),
// starting with the even phase after reset. The even phase can be busy
// (bit-serial DA takes one clock per data bit), so the input handshake
// stalls while the next sample is due to the even phase and that phase is
// not ready; the odd phase is always ready. The polyphase split follows the
// source design; the valid/ready back-pressure is this design's choice.
//
// Interface: a sample is taken when in_valid && in_ready; even_load or
// odd_load pulses in that same clock (combinational) and `phase` toggles on
// the clock edge. `phase` is 0 when the next sample goes to the even phase.
module polyphase_commutator (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic even_ready,
  output logic even_load,
  output logic odd_load,
  output logic phase
);

  assign in_ready  = phase ? 1'b1 : even_ready;
  assign even_load = in_valid && in_ready && !phase;
  assign odd_load  = in_valid && in_ready && phase;

  always_ff @(posedge clk) begin
    if (!rst_n)
      phase <= 1'b0;
    else if (in_valid && in_ready)
      phase <= !phase;
  end

endmodule

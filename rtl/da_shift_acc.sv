// da_shift_acc: the add/subtract shift-accumulator of bit-serial
// distributed arithmetic.
//
// Each enabled clock computes Y = B + A (sub = 0) or Y = B - A (sub = 1),
// where B is the accumulator scaled by 2^-1 (an arithmetic right shift) and
// A is the LUT word placed at the top of the accumulator. Bits of the data
// are presented LSB first and the last one, the two's-complement sign bit,
// is subtracted. After DATA_W steps the accumulator holds
//   sum_b (+/-)A_b * 2^b
// exactly: A is entered DATA_W-1 places up, so no right shift ever drops a
// non-zero bit. `first` restarts the sum (B taken as 0) on the first bit of
// a word. The +/- unit, the S control and the 2^-1 feedback follow the
// source design's DA figure; LSB-first order and the exact-width
// accumulator are this design's choices.
//
// Timing: one bit per clock; acc is valid the clock after the step with
// the sign bit. Reset (synchronous, active low) clears acc.
module da_shift_acc #(
  parameter int IN_W = 22,
  parameter int DATA_W = 16,
  parameter int ACC_W = IN_W + DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,     // process one bit this clock
  input  logic                    first,  // first bit of a word: B = 0
  input  logic                    sub,    // S: 1 on the sign bit
  input  logic signed [IN_W-1:0]  a,      // A: LUT word for this bit
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] a_ext, b_val;

  always_comb begin
    a_ext = ACC_W'(a) <<< (DATA_W - 1);
    if (first) b_val = '0;
    else       b_val = acc >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      acc <= '0;
    else if (en)
      acc <= sub ? (b_val - a_ext) : (b_val + a_ext);
  end

endmodule

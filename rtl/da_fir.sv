// da_fir: FIR section computed by bit-serial distributed arithmetic (DA).
//
// This is the even polyphase section of the decimator: 34 taps, no
// multipliers. The inner product
//   y = sum_k COEFS[k] * x[k],   x[0] the newest sample
// is rewritten over the bits of the two's-complement samples,
//   y = sum_{b<DATA_W-1} 2^b * L(x[.][b]) - 2^(DATA_W-1) * L(x[.][DATA_W-1]),
// where L(v) is the sum of the coefficients whose bit in v is 1. The
// samples sit in an input register (tap delay line). Each clock, one bit
// position of every sample addresses the look-up tables. The taps are
// split into partitions (8 8 8 8 2 by default), each with its own 2^K-word
// LUT. The five LUT words are added and fed to the shift-accumulator,
// which subtracts on the sign bit. The partitioning, the LUT/adder/
// shift-accumulator structure and the 16-bit precision follow the source
// design. The LSB-first order, the bit-select addressing and the
// valid/ready handshake are this design's choices.
//
// Interface: a sample is taken when in_valid && in_ready; it shifts the
// input register and starts a computation. in_ready is low while the
// DATA_W bit steps run. out_valid pulses for one clock DATA_W+1 clocks
// after the accepting edge; out_data is the full-precision result (scale
// 2^(COEF_FRAC) per unit, i.e. Q.30 for Q1.15 data and coefficients) and
// holds until the next computation ends. Synchronous active-low reset
// clears the input register.
module da_fir #(
  parameter int NTAPS = decim_pkg::N_EVEN,
  parameter int DATA_W = decim_pkg::DATA_W,
  parameter int COEF_W = decim_pkg::COEF_W,
  parameter int NP = decim_pkg::N_PART,
  parameter int P_SIZE [NP] = decim_pkg::PART_SIZE,
  parameter int P_BASE [NP] = decim_pkg::PART_BASE,
  parameter logic signed [COEF_W-1:0] COEFS [NTAPS] = decim_pkg::H_EVEN,
  parameter int L_W = COEF_W + $clog2(decim_pkg::PART_MAX),
  parameter int S_W = L_W + $clog2(NP),
  parameter int A_W = S_W + DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [A_W-1:0]    out_data
);

  localparam int CNT_W = $clog2(DATA_W);

  logic signed [DATA_W-1:0] taps [NTAPS];   // input register, taps[0] newest
  logic                     busy;
  logic [CNT_W-1:0]         bit_cnt;
  logic [NTAPS-1:0]         bit_slice;      // bit bit_cnt of every tap
  logic signed [L_W-1:0]    lut_word [NP];
  logic signed [S_W-1:0]    lut_sum;
  logic                     take;

  assign in_ready = !busy;
  assign take     = in_valid && in_ready;

  always_comb
    for (int t = 0; t < NTAPS; t++)
      bit_slice[t] = taps[t][bit_cnt];

  for (genvar p = 0; p < NP; p++) begin : g_lut
    localparam int K = P_SIZE[p];

    da_lut #(.K(K), .COEF_W(COEF_W), .OUT_W(L_W),
             .NC(NTAPS), .BASE(P_BASE[p]), .COEFS(COEFS)) u_lut (
      .addr (bit_slice[P_BASE[p] +: K]),
      .data (lut_word[p])
    );
  end

  always_comb begin
    lut_sum = '0;
    for (int p = 0; p < NP; p++)
      lut_sum += S_W'(lut_word[p]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NTAPS; t++) taps[t] <= '0;
      busy      <= 1'b0;
      bit_cnt   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (take) begin
        taps[0] <= in_data;
        for (int t = 1; t < NTAPS; t++) taps[t] <= taps[t-1];
        busy    <= 1'b1;
        bit_cnt <= '0;
      end else if (busy) begin
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == CNT_W'(DATA_W - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  da_shift_acc #(.IN_W(S_W), .DATA_W(DATA_W), .ACC_W(A_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (busy),
    .first (bit_cnt == '0),
    .sub   (bit_cnt == CNT_W'(DATA_W - 1)),
    .a     (lut_sum),
    .acc   (out_data)
  );

  // Every partition must fit the LUT word width chosen above.
  initial begin
    static int total = 0;
    for (int p = 0; p < NP; p++) begin
      assert (P_SIZE[p] <= 2**(L_W - COEF_W)) else $error("partition %0d too wide", p);
      total += P_SIZE[p];
    end
    assert (total == NTAPS) else $error("partitions do not cover the taps");
  end

  // No sample may be taken while a computation is running.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !take);

endmodule

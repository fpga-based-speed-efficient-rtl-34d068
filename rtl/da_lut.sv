// da_lut: distributed-arithmetic look-up table (2^K-word ROM).
//
// Word a holds the sum of the coefficients COEFS[BASE+i] whose address
// bit a[i] is 1 (word 0 is 0, word 1 is COEFS[0], word 3 is COEFS[0]+COEFS[1], ...),
// exactly the table of pre-computed partial sums used by distributed
// arithmetic. Address bit i carries one bit of the i-th tap sample. The
// contents are computed at elaboration from the COEFS parameter, so any
// coefficient set or partition size can be used; on an FPGA the array maps
// onto LUT ROM. The read is combinational, as in the source design's
// LUT-into-adder datapath. Output width OUT_W = COEF_W + clog2(K) by
// default, which cannot overflow for any K coefficients.
module da_lut #(
  parameter int K = 8,
  parameter int COEF_W = 16,
  parameter int OUT_W = COEF_W + $clog2(K),
  parameter int NC = K,      // length of the COEFS array
  parameter int BASE = 0,    // this table uses COEFS[BASE] .. COEFS[BASE+K-1]
  parameter logic signed [COEF_W-1:0] COEFS [NC] = '{default: '0}
) (
  input  logic [K-1:0]             addr,
  output logic signed [OUT_W-1:0]  data
);

  typedef logic signed [OUT_W-1:0] word_t;
  typedef word_t rom_t [2**K];

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 2**K; a++) begin
      word_t s = '0;
      for (int i = 0; i < K; i++)
        if (a[i]) s += word_t'(COEFS[BASE + i]);
      r[a] = s;
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[addr];

endmodule

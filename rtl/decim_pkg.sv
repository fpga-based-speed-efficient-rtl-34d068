// decim_pkg: widths, coefficient set and LUT partitioning shared by the
// half-band distributed-arithmetic decimator.
//
// The filter is a 67-tap (order 66) equiripple half-band low-pass for a
// 48 kHz input rate: pass band 0..9.6 kHz, stop band 14.4..24 kHz, about
// 110 dB stop-band attenuation before quantisation. A half-band filter has
// h[33] = 0.5 and h[n] = 0 for every other odd n, so the decimate-by-2
// polyphase split leaves
//   even phase  e0[k] = h[2k],   k = 0..33  (34 coefficients, the DA section)
//   odd phase   e1[k] = h[2k+1], k = 0..32  (33 coefficients, only e1[16] = 0.5)
// The even-phase values below are the equiripple design, rounded to signed
// Q1.15: e0[k] = round(32768 * h[2k]). They were obtained with the
// one-band half-band method: a 34-tap Parks-McClellan low-pass g with pass
// band 0..0.4 cycles/sample (2 x 9.6 kHz / 48 kHz) and h[2k] = g[k] / 2.
// Order, half-band type, equiripple method, 16-bit precision and the
// 34/33 split with (8 8 8 8 2) LUT partitioning follow the source design;
// the band edges were read off its plotted response and are this design's
// choice, as is the Q1.15 format.
package decim_pkg;

  localparam int DATA_W = 16;        // sample width, signed Q1.15
  localparam int COEF_W = 16;        // coefficient width, signed Q1.15
  localparam int COEF_FRAC = COEF_W - 1;
  localparam int NTAPS = 67;         // filter length (order 66)
  localparam int N_EVEN = 34;        // even-phase coefficients (DA section)
  localparam int N_ODD = 33;         // odd-phase coefficients
  localparam int ODD_CENTER = 16;    // index of the one non-zero odd-phase coefficient
  localparam int N_PART = 5;         // number of DA look-up tables

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [DATA_W-1:0] sample_t;

  // LUT partition sizes: taps 0-7, 8-15, 16-23, 24-31, 32-33
  localparam int PART_SIZE [N_PART] = '{8, 8, 8, 8, 2};
  localparam int PART_BASE [N_PART] = '{0, 8, 16, 24, 32};
  localparam int PART_MAX = 8;

  // Even-phase coefficients e0[0..33] (symmetric: e0[k] = e0[33-k])
  localparam coef_t H_EVEN [N_EVEN] = '{
       16'sd0,     -16'sd1,      16'sd4,     -16'sd9,
      16'sd19,    -16'sd36,     16'sd63,   -16'sd104,
     16'sd166,   -16'sd255,    16'sd382,   -16'sd560,
     16'sd817,  -16'sd1208,   16'sd1875,  -16'sd3346,
   16'sd10386,  16'sd10386,  -16'sd3346,   16'sd1875,
   -16'sd1208,    16'sd817,   -16'sd560,    16'sd382,
    -16'sd255,    16'sd166,   -16'sd104,     16'sd63,
     -16'sd36,     16'sd19,     -16'sd9,      16'sd4,
      -16'sd1,      16'sd0
  };

  // The odd-phase centre coefficient is exactly 0.5 = 2^(COEF_FRAC-1): it is
  // applied as a shift by COEF_FRAC-1 places (odd_phase_branch).

  // Widths of the DA datapath
  localparam int LUT_W = COEF_W + $clog2(PART_MAX);   // one LUT word (8 words of COEF_W bits)
  localparam int SUM_W = LUT_W + $clog2(N_PART);       // sum of the five LUT words
  localparam int ACC_W = SUM_W + DATA_W;               // full-precision inner product

endpackage

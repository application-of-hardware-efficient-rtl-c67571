// cic_comp_pkg: shared constants of the compensated CIC decimator.
//
// The chain decimates by 64 in three stages (8 * 4 * 2):
//   stage 1  CIC decimator, K = 8, P = 2 sections, no multipliers
//   stage 2  polyphase FIR compensator, 52 taps, decimation 4
//   stage 3  polyphase FIR lowpass, 51 taps, decimation 2
// The split of the decimation factor, the number of CIC sections and the
// tap counts (52 + 51 = 103 multipliers, 4 + 51 + 50 = 105 adders) are the
// published figures of this architecture. The sample width, the coefficient
// format and the coefficient values are this design's own choice.
//
// Coefficients are signed Q1.15 (16 bits, 15 fraction bits); each set sums
// to exactly 2^15, so every FIR stage has a DC gain of exactly one.
//   COMP_COEF  : weighted least-squares type-II FIR. In the passband
//                (0 .. 0.3 of the output Nyquist frequency) its target is
//                the inverse of the CIC magnitude |sin(pi*f*K)/(K*sin(pi*f))|^P.
//                It has zero target from (2 - 0.3)/8 cycles/sample (at its
//                input rate) upward: after decimation by 4 that band folds
//                below 0.6 of the output Nyquist frequency, into the band
//                the final stage keeps.
//   FINAL_COEF : equiripple (Parks-McClellan) lowpass, passband edge 0.075,
//                stopband edge 0.15 cycles/sample at its input rate, i.e.
//                0.3 and 0.6 of the output Nyquist frequency.
// Overall response of the quantised chain: within 0.035 dB from DC to 0.3 of
// the output Nyquist frequency, -3 dB near 0.4, below -55 dB from 0.6 up.
package cic_comp_pkg;

  localparam int unsigned SAMPLE_IN_W  = 16;  // input sample width
  localparam int unsigned CIC_K     = 8;   // CIC decimation factor
  localparam int unsigned CIC_P     = 2;   // CIC sections (filter order)
  localparam int unsigned CIC_OUT_W = SAMPLE_IN_W + CIC_P * $clog2(CIC_K); // 22
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 15;

  localparam int unsigned COMP_TAPS  = 52;
  localparam int unsigned COMP_DECIM = 4;
  localparam int unsigned FINAL_TAPS  = 51;
  localparam int unsigned FINAL_DECIM = 2;
  localparam int unsigned SAMPLE_OUT_W = 16;  // output sample width


  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t COMP_COEF [COMP_TAPS] = '{
    0, 0, 0, 0, 0, 2, 6, 9, 5, -12,
    -42, -68, -55, 31, 181, 315, 294, 3, -533, -1064,
    -1160, -402, 1348, 3773, 6143, 7610, 7610, 6143, 3773, 1348,
    -402, -1160, -1064, -533, 3, 294, 315, 181, 31, -55,
    -68, -42, -12, 5, 9, 6, 2, 0, 0, 0,
    0, 0
  };

  localparam coef_t FINAL_COEF [FINAL_TAPS] = '{
    -5, 0, 12, 34, 55, 58, 25, -49, -141, -201,
    -172, -24, 214, 444, 524, 338, -129, -739, -1212, -1213,
    -493, 985, 2981, 5020, 6545, 7054, 6545, 5020, 2981, 985,
    -493, -1213, -1212, -739, -129, 338, 524, 444, 214, -24,
    -172, -201, -141, -49, 25, 58, 55, 34, 12, 0,
    -5
  };

endpackage

// Shared constants and coefficient sets of the sigma-delta decimation filter.
//
// The whole datapath carries 16-bit words (the 1-bit modulator stream is zero padded
// to this width at the CIC input). FIR products and partial sums are 32 bits wide.
// Coefficients are signed Q1.15 numbers: the value 32768 stands for 1.0.
//
// The filter orders (8 and 18) follow the document; the coefficient values themselves
// are this design's own. They are equiripple low-pass designs with a 20 kHz passband
// edge (stage 2: stopband from 83 kHz at 195.3125 kHz sampling; stage 3: stopband from
// 32 kHz at 97.65625 kHz sampling), rounded to Q1.15, with the centre tap adjusted so
// that each set sums to exactly 32768 (DC gain 1).
package sdadc_pkg;

  localparam int unsigned WORD_LEN = 16;   // data word length of the filter chain
  localparam int unsigned ACC_LEN  = 32;   // FIR product and accumulator width
  localparam int unsigned COEF_FRAC_BITS = 15;

  typedef logic signed [WORD_LEN-1:0] word_t;
  typedef logic signed [ACC_LEN-1:0]  acc_t;

  // FIR stage 2: 9 taps (order 8), linear phase.
  localparam int unsigned FIR2_TAPS = 9;
  localparam word_t FIR2_COEFS [FIR2_TAPS] = '{
    -16'sd262, -16'sd1352, 16'sd575, 16'sd9484, 16'sd15878,
    16'sd9484, 16'sd575, -16'sd1352, -16'sd262
  };

  // FIR stage 3: 19 taps (order 18), linear phase.
  localparam int unsigned FIR3_TAPS = 19;
  localparam word_t FIR3_COEFS [FIR3_TAPS] = '{
    16'sd176, -16'sd31, -16'sd714, -16'sd255, 16'sd1326, 16'sd308, -16'sd2992,
    -16'sd419, 16'sd10254, 16'sd17462, 16'sd10254, -16'sd419, -16'sd2992,
    16'sd308, 16'sd1326, -16'sd255, -16'sd714, -16'sd31, 16'sd176
  };

endpackage

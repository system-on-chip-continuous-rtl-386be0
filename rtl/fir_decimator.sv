// Polyphase FIR decimator by 2, built from FIR atoms (FIR stages 2 and 3).
//
// The decimation system splits the input x[n] into its even phase x[2m] and odd phase
// x[2m-1]. Each phase has its own tap delay line: branch 1 holds the even phase and
// carries the even-indexed coefficients h[0], h[2], ...; branch 2 holds the odd phase
// and carries h[1], h[3], .... One FIR atom sits on every tap. The output is
//     y[m] = sum_j h[j] * x[2m - j]           (NUM_TAPS = filter length)
// with the 32-bit sum truncated to bits [30:15], i.e. divided by 2**15 (Q1.15
// coefficients) and rounded towards minus infinity.
//
// Sequence per output sample: the decimation system pulses, both delay lines shift,
// one clock later all atoms multiply, and then the additions ripple through the atom
// chain, starting with a 0 at the first atom of branch 2, through branch 2 and then
// branch 1. The last atom's `add_ready` is the output strobe `isNewSample`; `dataOUT`
// holds until the next output. Latency from the enable of the even input sample to
// `isNewSample` is NUM_TAPS + 2 clocks. A new input may come every NUM_TAPS + 3 clocks
// or slower (in this design they come every 256 or 512 clocks).
//
// After reset each atom copies its coefficient from its tap of the preloaded delay
// lines (2 clocks); `enable` must stay low during those clocks.
// The structure, the atom chain and the two delay lines follow the document; the
// coefficient values, the truncation point and the exact strobe timing are this
// design's choice.
module fir_decimator
  import sdadc_pkg::*;
#(
  parameter int unsigned NUM_TAPS = FIR2_TAPS,
  parameter word_t       COEFS [NUM_TAPS] = FIR2_COEFS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic [WORD_LEN-1:0] dataIN,
  output logic [WORD_LEN-1:0] dataOUT,
  output logic                isNewSample
);

  localparam int unsigned N1 = (NUM_TAPS + 1) / 2;   // even-indexed coefficients
  localparam int unsigned N2 = NUM_TAPS / 2;         // odd-indexed coefficients
  localparam int unsigned NA = N1 + N2;

  function automatic word_t phase_coef(int unsigned phase, int unsigned k);
    return COEFS[2*k + phase];
  endfunction

  typedef word_t coefs1_t [N1];
  typedef word_t coefs2_t [N2];

  function automatic coefs1_t coefs_even();
    coefs1_t c;
    for (int unsigned k = 0; k < N1; k++) c[k] = phase_coef(0, k);
    return c;
  endfunction

  function automatic coefs2_t coefs_odd();
    coefs2_t c;
    for (int unsigned k = 0; k < N2; k++) c[k] = phase_coef(1, k);
    return c;
  endfunction

  localparam coefs1_t C1 = coefs_even();
  localparam coefs2_t C2 = coefs_odd();

  word_t phase1, phase2;
  logic  phase_new, mult_go;
  word_t taps1 [N1];
  word_t taps2 [N2];
  logic  clr_fifo;

  // Atom chain in addition order: branch 2 atoms 0..N2-1, then branch 1 atoms 0..N1-1.
  word_t a_x    [NA];
  word_t a_coef [NA];
  acc_t  a_sum_in  [NA];
  acc_t  a_sum_out [NA];
  logic  a_add_en  [NA];
  logic  a_mult_rdy [NA];
  logic  a_add_rdy  [NA];
  logic  a_clr      [NA];

  fir_decim_sys decim (
    .clk, .rst, .enable, .dataIN,
    .dataOUT1(phase1), .dataOUT2(phase2), .isNewSample(phase_new));

  fir_coef_fifo #(.DEPTH(N1), .INIT_VALUES(C1)) fifo1 (
    .clk, .rst, .clr(clr_fifo), .enable(phase_new), .dataIN(phase1), .taps(taps1));
  fir_coef_fifo #(.DEPTH(N2), .INIT_VALUES(C2)) fifo2 (
    .clk, .rst, .clr(clr_fifo), .enable(phase_new), .dataIN(phase2), .taps(taps2));

  // Multiply one clock after the shift, when the taps hold the new samples.
  always_ff @(posedge clk) begin
    if (rst) mult_go <= 1'b0;
    else     mult_go <= phase_new;
  end

  always_comb begin
    for (int unsigned i = 0; i < NA; i++) begin
      if (i < N2) begin
        a_x[i]    = taps2[i];
        a_coef[i] = taps2[i];
      end else begin
        a_x[i]    = taps1[i - N2];
        a_coef[i] = taps1[i - N2];
      end
      a_sum_in[i] = (i == 0) ? '0 : a_sum_out[(i == 0) ? 0 : i - 1];
      a_add_en[i] = (i == 0) ? a_mult_rdy[0] : a_add_rdy[(i == 0) ? 0 : i - 1];
    end
  end

  for (genvar i = 0; i < int'(NA); i++) begin : g_atom
    fir_atom atom (
      .clk, .rst,
      .mult_input(a_x[i]), .input_coef(a_coef[i]),
      .adder_input(a_sum_in[i]),
      .enable_mult(mult_go), .enable_add(a_add_en[i]),
      .adder_out(a_sum_out[i]), .mult_ready(a_mult_rdy[i]),
      .add_ready(a_add_rdy[i]), .clrFIFO(a_clr[i]));
  end

  // The first atom's clear request empties both delay lines (all atoms leave reset
  // together, so one request stands for all).
  assign clr_fifo = a_clr[0];

  // Truncation of the Q1.15-weighted sum back to a data word.
  assign dataOUT     = a_sum_out[NA-1][COEF_FRAC_BITS +: WORD_LEN];
  assign isNewSample = a_add_rdy[NA-1];

endmodule

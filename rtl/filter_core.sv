// Three-stage decimation filter core: CIC (divide by 32), FIR (divide by 2),
// FIR (divide by 2); overall decimation 128.
//
// Input is the 1-bit modulator stream at 6.25 MHz, sampled from `pulseIN` when
// `reqNewData` is high (once every 8 clocks of the 50 MHz clock). The CIC delivers
// 16-bit words at 195.3125 kHz, FIR stage 2 (9 taps) halves that to 97.65625 kHz and
// FIR stage 3 (19 taps) to 48.828125 kHz: one `dataOUT` word per 1024 clocks, marked by
// a one-clock `isNewSample` pulse. Each stage's output strobe is the next stage's
// enable. The DC gain of the chain is 1024 (the CIC's), so an all-ones input stream
// settles at `dataOUT` = 1024.
// The cascade and its rates follow the document.
module filter_core
  import sdadc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                pulseIN,
  output logic                reqNewData,
  output logic [WORD_LEN-1:0] dataOUT,
  output logic                isNewSample
);

  logic [WORD_LEN-1:0] cic_out, fir2_out;
  logic                cic_new, fir2_new;

  cic cic_filter1 (
    .clk, .rst, .pulseIN,
    .dataOUT(cic_out), .isNewSample(cic_new), .reqNewData);

  fir_decimator #(.NUM_TAPS(FIR2_TAPS), .COEFS(FIR2_COEFS)) fir_filter2 (
    .clk, .rst, .enable(cic_new), .dataIN(cic_out),
    .dataOUT(fir2_out), .isNewSample(fir2_new));

  fir_decimator #(.NUM_TAPS(FIR3_TAPS), .COEFS(FIR3_COEFS)) fir_filter3 (
    .clk, .rst, .enable(fir2_new), .dataIN(fir2_out),
    .dataOUT, .isNewSample);

endmodule

// Decimation system in front of a polyphase FIR stage (polyphase split by 2).
//
// Two downsamplers share one enable. The upper one receives the input stream x[n]
// itself; the lower one receives x[n-1], taken from `prevData`, a register that
// captures the input one clock after each enable. On every second input sample,
// n = 0, 2, 4, ..., `isNewSample` pulses and the two phase outputs are
// `dataOUT1` = x[n] (even phase) and `dataOUT2` = x[n-1] (odd phase; 0 for n = 0).
//
// `dataIN` must hold its value for at least one clock after its enable, which the
// CIC and FIR outputs of this design do. Structure after the document's schematic;
// reset (synchronous, active high) is this design's choice.
module fir_decim_sys
  import sdadc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic [WORD_LEN-1:0] dataIN,
  output logic [WORD_LEN-1:0] dataOUT1,
  output logic [WORD_LEN-1:0] dataOUT2,
  output logic                isNewSample
);

  logic                enable_q;
  logic [WORD_LEN-1:0] prevData;
  logic                unused_new2;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable_q <= 1'b0;
      prevData <= '0;
    end else begin
      enable_q <= enable;
      if (enable_q) prevData <= dataIN;
    end
  end

  fir_downsampler down1 (
    .clk, .rst, .enable, .dataIn(dataIN),   .dataOUT(dataOUT1), .isNewSample(isNewSample));
  fir_downsampler down2 (
    .clk, .rst, .enable, .dataIn(prevData), .dataOUT(dataOUT2), .isNewSample(unused_new2));

endmodule

// Downsample-by-2 unit of the FIR decimation system.
//
// `enable` marks the cycles in which `dataIn` carries a new input sample. A toggle
// flip-flop, advanced one clock after each enable, lets every other enable through:
// in those cycles `isNewSample` is high and `dataOUT` follows `dataIn` directly; at all
// other times `dataOUT` repeats the last sample passed, held in a data register.
// After reset the first enable is passed, then the third, the fifth, and so on.
//
// The toggle, its enable register, the NOT/AND gating of `isNewSample` and the
// data register with its output multiplexer follow the document's schematic. Reset
// (synchronous, active high) is this design's choice.
module fir_downsampler
  import sdadc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic [WORD_LEN-1:0] dataIn,
  output logic [WORD_LEN-1:0] dataOUT,
  output logic                isNewSample
);

  logic                enable_q, toggle;
  logic [WORD_LEN-1:0] data;

  assign isNewSample = enable && !toggle;
  assign dataOUT     = isNewSample ? dataIn : data;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable_q <= 1'b0;
      toggle   <= 1'b0;
      data     <= '0;
    end else begin
      enable_q <= enable;
      if (enable_q) toggle <= !toggle;
      data <= dataOUT;
    end
  end

endmodule

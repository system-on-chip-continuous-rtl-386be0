// Tap delay line of one polyphase branch, preloaded with that branch's coefficients.
//
// The line has DEPTH word registers; every register is a tap (`taps[0]` is the newest
// sample). Reset loads the registers with INIT_VALUES, the branch's filter
// coefficients, so that each FIR atom can copy its coefficient from its tap in the
// first clock after reset. A one-clock `clr` then empties the line, and from then on
// each `enable` shifts `dataIN` in at `taps[0]`: the line becomes the branch's delay
// chain x[m], x[m-1], ..., x[m-DEPTH+1].
//
// Preloading the coefficients through the delay line and clearing it afterwards
// follow the document; reset polarity and priority (reset over clear over shift) are
// this design's choice.
module fir_coef_fifo
  import sdadc_pkg::*;
#(
  parameter int unsigned DEPTH = 5,
  parameter word_t INIT_VALUES [DEPTH] = '{default: '0}
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clr,
  input  logic  enable,
  input  word_t dataIN,
  output word_t taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      taps <= INIT_VALUES;
    end else if (clr) begin
      taps <= '{default: '0};
    end else if (enable) begin
      taps[0] <= dataIN;
      for (int i = 1; i < int'(DEPTH); i++)
        taps[i] <= taps[i-1];
    end
  end

endmodule

// One integrator section of the CIC decimator.
//
// On every cycle in which `enable` is high the section adds `inData` to its running
// sum; `outData` is that sum, held in a register between enables. The sum wraps
// modulo 2**WIDTH, which is exact for a CIC filter as long as WIDTH covers the
// filter's total gain (the comb sections undo the wrap).
//
// Timing: the new sum appears on `outData` one clock after the enable cycle. A
// second integrator in cascade therefore takes an enable delayed by one clock.
// Reset (`rst`, synchronous, active high) clears the sum; the document does not
// describe reset, so its polarity and type are this design's choice.
module cic_integrator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [WIDTH-1:0] inData,
  output logic [WIDTH-1:0] outData
);

  always_ff @(posedge clk) begin
    if (rst)
      outData <= '0;
    else if (enable)
      outData <= outData + inData;
  end

endmodule

// One comb section of the CIC decimator (differential delay M = 1).
//
// On every cycle in which `enable` is high the section outputs the difference between
// the current input and the input of the previous enable, and stores the current input
// for the next time. Arithmetic is modulo 2**WIDTH.
//
// Timing: `outData` is registered and changes one clock after the enable cycle; it
// holds between enables. Reset (synchronous, active high) clears the stored input and
// the output; reset behaviour is this design's choice.
module cic_comb #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [WIDTH-1:0] inData,
  output logic [WIDTH-1:0] outData
);

  logic [WIDTH-1:0] prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev    <= '0;
      outData <= '0;
    end else if (enable) begin
      prev    <= inData;
      outData <= inData - prev;
    end
  end

endmodule

// FPGA demonstrator of the sigma-delta decimation filter: filter core, capture buffer
// and serial transmitter.
//
// `pulseIN` carries the 1-bit stream of a second-order sigma-delta modulator at
// 6.25 MHz; `cic_reqNewData` pulses once every 8 clocks (50 MHz clock) in the cycle the
// bit is taken, and a bit source clocked by it keeps the two in step. The filter core
// decimates by 128 to 16-bit words at 48.828125 kHz (`isNewSample` marks each word).
// The capture buffer stores 256 consecutive words and then sends them over `tx`
// (8N1 serial, 115200 baud by default, low byte first), after which it captures the
// next 256 words.
// The partition into filter core, buffer and transmitter and the top-level signal
// names follow the document.
module filter4sigmaDelta
  import sdadc_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned BUFFER_DEPTH = 256
) (
  input  logic clk,
  input  logic rst,
  input  logic pulseIN,
  output logic tx,
  output logic isNewSample,
  output logic cic_reqNewData
);

  logic [WORD_LEN-1:0] core_data;
  logic [7:0]          byte_data;
  logic                send, tx_done;

  filter_core core (
    .clk, .rst, .pulseIN, .reqNewData(cic_reqNewData),
    .dataOUT(core_data), .isNewSample);

  data_buffer #(.DEPTH(BUFFER_DEPTH)) buffer1 (
    .clk, .rst, .dataIN(core_data), .writeData(isNewSample),
    .istxDone(tx_done), .data2send(byte_data), .send);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) txUnit (
    .clk, .rst, .send, .data2send(byte_data), .tx, .done(tx_done));

endmodule

// Serial transmitter, 8 data bits, no parity, one stop bit, least significant bit
// first.
//
// A one-clock `send` pulse while the transmitter is idle loads `data2send`; the line
// `tx` (idle high) then carries a start bit (low), the 8 data bits and a stop bit
// (high), each CLKS_PER_BIT clocks long. `done` pulses for one clock at the end of the
// stop bit, after which the next byte may be sent; `send` while busy is ignored.
// The default of 434 clocks per bit gives 115200 baud from a 50 MHz clock.
// The document names a serial transmit unit with `send`, `data2send[7:0]`, `tx` and
// `done`; the frame format and the baud rate are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       send,
  input  logic [7:0] data2send,
  output logic       tx,
  output logic       done
);

  localparam int unsigned DW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} tx_state_t;

  tx_state_t   state;
  logic [DW-1:0] div;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        bit_end;

  assign bit_end = (div == DW'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      div     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      tx      <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      div  <= (state == IDLE || bit_end) ? '0 : div + 1'b1;
      unique case (state)
        IDLE: if (send) begin
          shreg <= data2send;
          tx    <= 1'b0;
          state <= START;
        end
        START: if (bit_end) begin
          tx      <= shreg[0];
          shreg   <= shreg >> 1;
          bit_idx <= '0;
          state   <= DATA;
        end
        DATA: if (bit_end) begin
          if (bit_idx == 3'd7) begin
            tx    <= 1'b1;
            state <= STOP;
          end else begin
            tx      <= shreg[0];
            shreg   <= shreg >> 1;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        STOP: if (bit_end) begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule

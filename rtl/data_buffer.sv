// Capture buffer between the filter core and the serial transmitter.
//
// The filter produces a 16-bit word every 1024 clocks (48.8 kHz), far faster than a
// serial link can carry it, so the buffer works in two alternating phases:
//   fill  - each `writeData` strobe stores `dataIN` in the next of DEPTH words of a
//           synchronous RAM, until the RAM is full;
//   empty - the words are read back in write order and each is handed to the
//           transmitter as two bytes, low byte first: `send` pulses for one clock with
//           the byte on `data2send`, and the next byte waits for `istxDone`.
// Strobes that arrive while the buffer is emptying are dropped; after the last word is
// sent the buffer starts filling again. One address register serves both phases.
//
// The RAM size (256 x 16 bits), the single address register, the byte-wide output and
// the state names follow the document; the byte order, the dropping of samples while
// emptying and the read-wait state are this design's choice.
module data_buffer
  import sdadc_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [WORD_LEN-1:0] dataIN,
  input  logic                writeData,
  input  logic                istxDone,
  output logic [7:0]          data2send,
  output logic                send
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [2:0] {
    WAIT_DATA, UPDATE_WR_ADDR, READ_WORD, SEND_DATA_P1, WAIT_P1,
    SEND_DATA_P2, WAIT_P2, UPDATE_RD_ADDR
  } buf_state_t;

  buf_state_t          state;
  logic [AW-1:0]       addr;
  logic [WORD_LEN-1:0] the_buffer [DEPTH];
  logic [WORD_LEN-1:0] rdata;
  logic                last;

  assign last = (addr == AW'(DEPTH - 1));

  // Synchronous RAM: one write port, one registered read port on the same address.
  always_ff @(posedge clk) begin
    if (state == WAIT_DATA && writeData)
      the_buffer[addr] <= dataIN;
    rdata <= the_buffer[addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAIT_DATA;
      addr  <= '0;
    end else begin
      unique case (state)
        WAIT_DATA:      if (writeData) state <= UPDATE_WR_ADDR;
        UPDATE_WR_ADDR: begin
          addr  <= last ? '0 : addr + 1'b1;
          state <= last ? READ_WORD : WAIT_DATA;
        end
        READ_WORD:      state <= SEND_DATA_P1;
        SEND_DATA_P1:   state <= WAIT_P1;
        WAIT_P1:        if (istxDone) state <= SEND_DATA_P2;
        SEND_DATA_P2:   state <= WAIT_P2;
        WAIT_P2:        if (istxDone) state <= UPDATE_RD_ADDR;
        UPDATE_RD_ADDR: begin
          addr  <= last ? '0 : addr + 1'b1;
          state <= last ? WAIT_DATA : READ_WORD;
        end
        default:        state <= WAIT_DATA;
      endcase
    end
  end

  assign send      = (state == SEND_DATA_P1) || (state == SEND_DATA_P2);
  assign data2send = (state == SEND_DATA_P2) ? rdata[15:8] : rdata[7:0];

endmodule

// FIR atom: one coefficient, one multiplier and one adder of a chained FIR sum.
//
// A four-state machine runs the atom:
//   LOAD_COEF  (first clock after reset) copies `input_coef` into the coefficient
//              register;
//   CLEAR_FIFO raises `clrFIFO` for one clock so the delay line that carried the
//              coefficients can be emptied;
//   DO_MULT    waits for `enable_mult`, then registers mult_input * coefficient
//              (16 x 16 -> 32 bits, signed) and pulses `mult_ready`;
//   ADDITION   waits for `enable_add`, then registers adder_input + product into
//              `adder_out`, pulses `add_ready` and returns to DO_MULT.
// All atoms of a filter multiply in the same clock; the additions ripple from atom to
// atom, each atom's `add_ready` enabling the next one's addition.
//
// Timing: `mult_ready` is high in the clock after the `enable_mult` cycle, `add_ready`
// in the clock after the `enable_add` cycle, with `adder_out` valid from that clock
// on. The state names, the port list and the widths follow the document; the state
// transitions are this design's reading of what the atom has to do.
module fir_atom
  import sdadc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t mult_input,
  input  word_t input_coef,
  input  acc_t  adder_input,
  input  logic  enable_mult,
  input  logic  enable_add,
  output acc_t  adder_out,
  output logic  mult_ready,
  output logic  add_ready,
  output logic  clrFIFO
);

  typedef enum logic [1:0] {LOAD_COEF, CLEAR_FIFO, DO_MULT, ADDITION} atom_state_t;

  atom_state_t state;
  word_t       coef;
  acc_t        product;

  assign clrFIFO = (state == CLEAR_FIFO);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= LOAD_COEF;
      coef       <= '0;
      product    <= '0;
      adder_out  <= '0;
      mult_ready <= 1'b0;
      add_ready  <= 1'b0;
    end else begin
      mult_ready <= 1'b0;
      add_ready  <= 1'b0;
      unique case (state)
        LOAD_COEF: begin
          coef  <= input_coef;
          state <= CLEAR_FIFO;
        end
        CLEAR_FIFO: state <= DO_MULT;
        DO_MULT: if (enable_mult) begin
          product    <= acc_t'(mult_input) * acc_t'(coef);
          mult_ready <= 1'b1;
          state      <= ADDITION;
        end
        ADDITION: if (enable_add) begin
          adder_out <= adder_input + product;
          add_ready <= 1'b1;
          state     <= DO_MULT;
        end
        default: state <= LOAD_COEF;
      endcase
    end
  end

  // A new multiplication may only be requested once the previous sum has passed.
  assert property (@(posedge clk) disable iff (rst)
                   enable_mult |-> state != ADDITION)
    else $error("fir_atom: enable_mult while an addition is pending");

endmodule

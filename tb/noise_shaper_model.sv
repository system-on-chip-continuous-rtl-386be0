// Behavioural model of the second-order sigma-delta modulator (analog in the real
// design) for simulation only.
//
// Discrete-time equivalent of the loop: a delay-free integrator 1/(1 - z^-1) followed by
// a delaying integrator z^-1/(1 - z^-1), both fed back from the 1-bit output, which
// gives Y = z^-1 U + (1 - z^-1)^2 E. Per sample n:
//   v2[n] = v2[n-1] + v1[n-1] - y[n-1];  y[n] = sign(v2[n]);  v1[n] = v1[n-1] + u[n] - y[n]. The analog input `vin` is a real number in [0, 1]
// (mid-scale 0.5); internally it is mapped to [-1, 1]. On every clock with `sample`
// high the model takes `vin` and updates `bit_out` (1 when the quantiser input is not
// negative). Inputs beyond about 0.15 .. 0.85 overload the loop.
module noise_shaper_model (
  input  logic clk,
  input  logic rst,
  input  logic sample,
  input  real  vin,
  output logic bit_out
);

  real v1, v2, y;
  real v2_next, y_next;

  // Quantiser input of the next sample and the bit decided from it.
  assign v2_next = v2 + v1 - y;
  assign y_next  = (v2_next >= 0.0) ? 1.0 : -1.0;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 0.0;
      v2 <= 0.0;
      y  <= -1.0;
      bit_out <= 1'b0;
    end else if (sample) begin
      v2 <= v2_next;
      y  <= y_next;
      v1 <= v1 + (2.0 * vin - 1.0) - y_next;
      bit_out <= (y_next > 0.0);
    end
  end

endmodule

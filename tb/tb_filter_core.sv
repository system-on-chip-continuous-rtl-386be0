// Self-checking test of the three-stage filter core at its default sizes.
// A behavioural second-order modulator turns a 1 kHz sine (0.5 +- 0.25 of full scale)
// into the 6.25 MHz bit stream, clocked by `reqNewData`; after 2.5 periods the input
// switches to a constant all-ones stream. Every output word is compared with the
// reference model of CIC -> FIR -> FIR fed with the same bits. Also checked: one output
// per 1024 clocks (48.83 kHz), the sine's swing at the output, and settling to 1024 for the
// all-ones input.
module tb_filter_core;
  import sdadc_ref_pkg::*;
  localparam int unsigned SINE_BITS = 15625;   // 2.5 periods of 1 kHz at 6.25 MHz
  localparam int unsigned DC_BITS   = 12800;
  logic clk = 0, rst = 1, pulseIN, reqNewData, isNewSample;
  logic [15:0] dataOUT;
  logic mod_bit;
  real  vin = 0.5;
  int checks = 0, failures = 0;
  chain_model model;
  int nbits = 0, nout = 0, cyc = 0, last_out = -1;
  int vmax = -100000, vmin = 100000, settled = 0;

  filter_core dut (.*);
  noise_shaper_model modulator (.clk, .rst, .sample(reqNewData), .vin, .bit_out(mod_bit));

  assign pulseIN = (nbits < SINE_BITS) ? mod_bit : 1'b1;

  always #10 clk = ~clk;

  initial begin
    #50ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && reqNewData) begin
      model.push_bit(pulseIN);
      nbits <= nbits + 1;
      vin <= 0.5 + 0.25 * $sin(2.0 * 3.14159265358979 * 1000.0 * real'(nbits + 1) / 6.25e6);
    end
    if (!rst && isNewSample) begin
      automatic int got = int'($signed(dataOUT));
      checks++;
      if (nout >= model.core_out.size()) begin
        failures++;
        $display("output %0d without reference", nout);
      end else if (got != model.core_out[nout]) begin
        failures++;
        if (failures < 8) $display("out %0d: got %0d expected %0d", nout, got, model.core_out[nout]);
      end
      if (nbits < int'(SINE_BITS) && nout > 20) begin
        if (got > vmax) vmax = got;
        if (got < vmin) vmin = got;
      end
      if (got == 1024) settled++;
      if (last_out >= 0) begin checks++; if (cyc - last_out != 1024) failures++; end
      last_out <= cyc;
      nout <= nout + 1;
    end
  end

  initial begin
    automatic int h2[], h3[];
    stage_coefs(h2, h3);
    model = new(h2, h3);
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (nbits >= int'(SINE_BITS + DC_BITS));
    repeat (2000) @(posedge clk);
    // a 0.25 full-scale sine gives about +-256 around 512 at the output
    checks++;
    if (vmax < 700 || vmax > 830 || vmin < 190 || vmin > 320) failures++;
    checks++;
    if (settled < 20) failures++;
    checks++;
    if (nout < int'((SINE_BITS + DC_BITS) / 128) - 2) failures++;
    $display("outputs=%0d sine swing %0d..%0d settled_at_1024=%0d", nout, vmin, vmax, settled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the FIR atom: the atom must copy its coefficient in the first
// clock after reset, request the delay-line clear in the second, and then, for random
// samples and partial sums, deliver adder_input + sample * coefficient with
// `mult_ready` one clock after `enable_mult` and `add_ready` one clock after
// `enable_add`. Repeated for several random coefficients, including negative ones.
module tb_fir_atom;
  import sdadc_pkg::*;
  logic clk = 0, rst = 1;
  word_t mult_input = '0, input_coef = '0;
  acc_t adder_input = '0, adder_out;
  logic enable_mult = 0, enable_add = 0, mult_ready, add_ready, clrFIFO;
  int checks = 0, failures = 0;

  fir_atom dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      automatic word_t c = (r == 0) ? -16'sd32768 : word_t'($urandom);
      rst <= 1;
      input_coef <= c;
      repeat (2) @(posedge clk);
      rst <= 0;
      @(posedge clk);            // LOAD_COEF
      input_coef <= word_t'($urandom);  // must no longer matter
      #1;
      checks++;
      if (!clrFIFO) failures++;
      @(posedge clk); #1;
      checks++;
      if (clrFIFO) failures++;
      for (int s = 0; s < 50; s++) begin
        automatic word_t x = (s == 0) ? -16'sd32768 : word_t'($urandom);
        automatic acc_t  a = acc_t'($urandom) >>> 2;
        automatic acc_t  e = a + acc_t'(longint'(x) * longint'(c));
        repeat ($urandom % 3) @(posedge clk);
        mult_input <= x;
        enable_mult <= 1;
        @(posedge clk);
        enable_mult <= 0;
        mult_input <= word_t'($urandom);
        #1;
        checks++;
        if (!mult_ready || add_ready) failures++;
        repeat ($urandom % 3) begin
          @(posedge clk); #1;
          checks++;
          if (mult_ready || add_ready) failures++;
        end
        adder_input <= a;
        enable_add <= 1;
        @(posedge clk);
        enable_add <= 0;
        adder_input <= acc_t'($urandom);
        #1;
        checks++;
        if (!add_ready || adder_out !== e) begin
          failures++;
          if (failures < 6) $display("r=%0d s=%0d got %0d expected %0d", r, s, adder_out, e);
        end
        @(posedge clk); #1;
        checks++;
        if (add_ready || adder_out !== e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of one CIC comb section: random inputs on random enables; the
// output must equal the current input minus the input of the previous enable
// (modulo 2^16) and hold between enables.
module tb_cic_comb;
  logic clk = 0, rst = 1, enable = 0;
  logic [15:0] inData = 0, outData;
  int checks = 0, failures = 0;
  logic [15:0] prev = 0, expd = 0;

  cic_comb #(.WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      enable <= ($urandom % 4) == 0;
      inData <= 16'($urandom);
      @(posedge clk);
      if (enable) begin
        expd = inData - prev;
        prev = inData;
      end
      #1;
      checks++;
      if (outData !== expd) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: got %0d expected %0d", i, outData, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

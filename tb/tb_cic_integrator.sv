// Self-checking test of one CIC integrator section: random inputs and random enables,
// compared with a running sum kept modulo 2^16, including wrap-around.
module tb_cic_integrator;
  logic clk = 0, rst = 1, enable = 0;
  logic [15:0] inData = 0, outData;
  int checks = 0, failures = 0;
  logic [15:0] model = 0;
  int wraps = 0;

  cic_integrator #(.WIDTH(16)) dut (.*);

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
      enable <= ($urandom % 3) != 0;
      inData <= (i < 1500) ? 16'($urandom) : 16'($urandom % 2);
      @(posedge clk);
      if (enable) begin
        if (32'(model) + 32'(inData) > 32'hFFFF) wraps++;
        model = model + inData;
      end
      #1;
      checks++;
      if (outData !== model) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: got %0d expected %0d", i, outData, model);
      end
    end
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

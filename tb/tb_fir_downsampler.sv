// Self-checking test of the downsample-by-2 unit: enables at random spacing (at least
// 2 clocks apart) with random data. Every second enable, starting with the first, must
// raise `isNewSample` and pass the data; at all other times the output must hold the
// last passed sample.
module tb_fir_downsampler;
  logic clk = 0, rst = 1, enable = 0, isNewSample;
  logic [15:0] dataIn = 0, dataOUT;
  int checks = 0, failures = 0;
  int n_en = 0;
  logic [15:0] held = 0;

  fir_downsampler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      enable <= 1'b0;
      dataIn <= 16'($urandom);
      repeat (1 + $urandom % 3) begin
        @(posedge clk); #1;
        checks++;
        if (isNewSample || dataOUT !== held) failures++;
      end
      enable <= 1'b1;
      dataIn <= 16'($urandom);
      #1;
      @(negedge clk);
      checks++;
      if (isNewSample !== (n_en % 2 == 0)) failures++;
      if (n_en % 2 == 0) begin
        held = dataIn;
        checks++;
        if (dataOUT !== dataIn) failures++;
      end else begin
        checks++;
        if (dataOUT !== held) failures++;
      end
      n_en++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

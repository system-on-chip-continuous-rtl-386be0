// Self-checking test of the serial transmitter with a short bit time (8 clocks per
// bit). Random bytes are sent, with `send` pulses while busy that must be ignored; a
// receiver in the testbench samples the line in the middle of each bit and checks the
// start bit, the 8 data bits (LSB first), the stop bit, the frame length of
// 10 x CLKS_PER_BIT clocks and the `done` pulse at its end.
module tb_uart_tx;
  localparam int unsigned CPB = 8;
  logic clk = 0, rst = 1, send = 0, tx, done;
  logic [7:0] data2send = 0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (tx !== 1'b1) failures++;
    for (int n = 0; n < 300; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      logic [7:0] got;
      int len;
      data2send <= b;
      send <= 1;
      @(posedge clk);
      send <= 0;
      data2send <= ~b;
      // line goes low at this edge (start bit)
      @(negedge clk);
      checks++;
      if (tx !== 1'b0) failures++;
      repeat (CPB / 2) @(negedge clk);
      checks++;
      if (tx !== 1'b0) failures++;          // middle of start bit
      for (int i = 0; i < 8; i++) begin
        for (int k = 0; k < int'(CPB); k++) begin
          @(negedge clk);
          send <= (i == 3 && k == 0);       // a send while busy must be ignored
        end
        got[i] = tx;
      end
      repeat (CPB) @(negedge clk);
      checks++;
      if (tx !== 1'b1) failures++;          // stop bit
      checks++;
      if (got !== b) begin
        failures++;
        if (failures < 5) $display("byte %0d: got %h expected %h", n, got, b);
      end
      len = 0;
      while (!done && len < 4 * CPB) begin @(negedge clk); len++; end
      checks++;
      if (!done || len > CPB) failures++;
      @(posedge clk);
      if (($urandom % 2) != 0) repeat ($urandom % 20) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the polyphase split: a random input stream x[n], one sample per
// 4..7 clocks, held between enables. On every second sample (n = 0, 2, ...) the unit
// must deliver x[n] on `dataOUT1` and x[n-1] on `dataOUT2` with `isNewSample` high,
// and no strobe for odd n.
module tb_fir_decim_sys;
  logic clk = 0, rst = 1, enable = 0, isNewSample;
  logic [15:0] dataIN = 0, dataOUT1, dataOUT2;
  int checks = 0, failures = 0;
  logic [15:0] prev;

  fir_decim_sys dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prev = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      automatic logic [15:0] x = 16'($urandom);
      enable <= 1'b1;
      dataIN <= x;
      @(negedge clk);
      checks++;
      if (isNewSample !== (n % 2 == 0)) failures++;
      if (n % 2 == 0) begin
        checks++;
        if (dataOUT1 !== x || dataOUT2 !== prev) begin
          failures++;
          if (failures < 5) $display("n=%0d got %h/%h expected %h/%h", n, dataOUT1, dataOUT2, x, prev);
        end
      end
      @(posedge clk);
      enable <= 1'b0;
      repeat (3 + $urandom % 4) begin
        @(negedge clk);
        checks++;
        if (isNewSample) failures++;
      end
      prev = x;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the preloaded tap delay line: after reset the taps must show the
// preload values, `clr` must empty them, and afterwards each `enable` must shift a new
// word into tap 0 with the older words moving one tap on (compared with a model queue).
module tb_fir_coef_fifo;
  import sdadc_pkg::*;
  localparam int unsigned D = 5;
  localparam word_t INIT [D] = '{16'sd11, -16'sd22, 16'sd33, -16'sd44, 16'sd55};
  logic clk = 0, rst = 1, clr = 0, enable = 0;
  word_t dataIN = '0;
  word_t taps [D];
  word_t model [D];
  int checks = 0, failures = 0;

  fir_coef_fifo #(.DEPTH(D), .INIT_VALUES(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < int'(D); i++) begin
      checks++;
      if (taps[i] !== model[i]) begin
        failures++;
        if (failures < 6) $display("%s: tap %0d got %0d expected %0d", what, i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    #1;
    model = INIT;
    compare("preload");
    @(posedge clk);
    clr <= 1;
    @(posedge clk);
    clr <= 0;
    #1;
    model = '{default: '0};
    compare("clear");
    for (int n = 0; n < 2000; n++) begin
      enable <= 1'($urandom % 2);
      dataIN <= word_t'($urandom);
      @(posedge clk);
      if (enable) begin
        for (int i = int'(D) - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = dataIN;
      end
      #1;
      compare("shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

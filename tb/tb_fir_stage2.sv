// Self-checking test of FIR stage 2 (9-tap polyphase decimator by 2) at its default
// parameters. Random 16-bit words, full-range first and then CIC-range (0..1024),
// arrive one every 256 clocks (195.3 kHz at 50 MHz) and are held in between. Every
// output is compared with the direct-form convolution of the reference model. Also
// checked: one output per two inputs (every 512 clocks), a latency of NUM_TAPS + 2
// clocks from the even input's enable, and that an impulse returns the coefficients.
module tb_fir_stage2;
  import sdadc_pkg::*;
  import sdadc_ref_pkg::*;
  localparam int unsigned TAPS = FIR2_TAPS;
  localparam int unsigned SPACING = 256;
  logic clk = 0, rst = 1, enable = 0, isNewSample;
  logic [15:0] dataIN = 0, dataOUT;
  int checks = 0, failures = 0;
  fir_model model;
  int expq[$];
  int cyc = 0, last_en_even = -1, last_out = -1, nin = 0, nout = 0;

  fir_decimator #(.NUM_TAPS(TAPS), .COEFS(FIR2_COEFS)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && isNewSample) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        automatic int e = expq.pop_front();
        if (int'($signed(dataOUT)) != e) begin
          failures++;
          if (failures < 8) $display("out %0d: got %0d expected %0d", nout, $signed(dataOUT), e);
        end
      end
      checks++;
      if (cyc - last_en_even != int'(TAPS) + 2) begin
        failures++;
        $display("latency %0d", cyc - last_en_even);
      end
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != 2 * int'(SPACING)) failures++;
      end
      last_out <= cyc;
      nout <= nout + 1;
    end
  end

  initial begin
    int h2[], h3[], y;
    stage_coefs(h2, h3);
    model = new(h2);
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 1600; n++) begin
      logic [15:0] x;
      if (n < 40)        x = (n == 20) ? 16'd32767 : 16'd0;   // impulse at an even index
      else if (n < 800)  x = 16'($urandom);
      else               x = 16'($urandom % 1025);
      dataIN <= x;
      enable <= 1;
      if (model.push(int'(x), y)) expq.push_back(y);
      if (n % 2 == 0) last_en_even <= cyc + 1;   // cycle number of the enable clock
      nin++;
      @(posedge clk);
      enable <= 0;
      repeat (SPACING - 1) @(posedge clk);
    end
    repeat (SPACING) @(posedge clk);
    checks++;
    if (nout != 800 || expq.size() != 0) failures++;
    $display("inputs=%0d outputs=%0d", nin, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end test of the FPGA demonstrator at its default parameters (256-word buffer,
// 434 clocks per serial bit, 50 MHz clock).
//
// A behavioural second-order modulator, stepped by `cic_reqNewData`, turns a sine of
// 0.25 full scale around mid-scale into the bit stream: 1 kHz during the first capture,
// 2 kHz afterwards. The testbench decodes the serial line (8N1, 115200 baud) and
// checks two complete capture/send rounds:
//  * round 0 must return filter outputs 0..255 exactly as the reference model of the
//    filter chain predicts them, low byte first;
//  * nothing may be sent before the 256th word is captured;
//  * outputs produced while the buffer is being sent must be dropped, and round 1 must
//    return the 256 consecutive outputs that follow the end of round 0's transmission;
//  * `isNewSample` must pulse once every 1024 clocks throughout.
// It counts how often each mechanism happened (buffer full, byte sent, sample dropped,
// refill, CIC integrator wrap-around, input frequency switch) and fails for any that
// never did.
module tb_filter4sigmaDelta;
  import sdadc_ref_pkg::*;
  localparam int CPB   = 434;
  localparam int DEPTH = 256;
  logic clk = 0, rst = 1, pulseIN, tx, isNewSample, cic_reqNewData;
  logic mod_bit;
  real  vin = 0.5, freq = 1000.0, phase = 0.0;
  int checks = 0, failures = 0;
  chain_model model;
  int cyc = 0, nout = 0, last_out = -1;
  int words[$];
  int first_start_out = -1;     // output count when the first start bit appeared
  int tx_end_out[$];            // output count when each round's last stop bit ended
  int bytes_sent = 0, dropped = 0, rounds_done = 0, freq_switches = 0;
  logic [15:0] int1 = 0, int2 = 0;
  int cic_wraps = 0;
  bit sending = 0;

  filter4sigmaDelta dut (.*);
  noise_shaper_model modulator (.clk, .rst, .sample(cic_reqNewData), .vin, .bit_out(mod_bit));
  assign pulseIN = mod_bit;

  always #10 clk = ~clk;

  initial begin
    #150ms; failures++;
    $display("watchdog: outputs=%0d bytes=%0d", nout, bytes_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Input side: reference model, modulator input, integrator wrap count.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && cic_reqNewData) begin
      logic [15:0] n1;
      model.push_bit(pulseIN);
      n1 = int1 + 16'(pulseIN);
      if (32'(int2) + 32'(n1) > 32'hFFFF) cic_wraps++;
      int2 = int2 + n1;
      int1 = n1;
      phase = phase + 2.0 * 3.14159265358979 * freq / 6.25e6;
      vin <= 0.5 + 0.25 * $sin(phase);
    end
    if (!rst && isNewSample) begin
      if (last_out >= 0) begin checks++; if (cyc - last_out != 1024) failures++; end
      last_out <= cyc;
      if (sending) dropped++;
      nout <= nout + 1;
      if (nout == DEPTH && freq == 1000.0) begin freq = 2000.0; freq_switches++; end
    end
  end

  // Serial receiver.
  initial begin
    logic [7:0] b;
    automatic int lo = 0;
    automatic bit have_lo = 0;
    wait (!rst);
    forever begin
      @(negedge tx);
      sending = 1;
      if (first_start_out < 0) first_start_out = nout;
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (tx !== 1'b0) failures++;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx !== 1'b1) failures++;
      bytes_sent++;
      if (!have_lo) begin lo = int'(b); have_lo = 1; end
      else begin
        words.push_back(int'({b, lo[7:0]}));
        have_lo = 0;
        if (words.size() % DEPTH == 0) begin
          repeat (CPB / 2 + 4) @(posedge clk);
          sending = 0;
          tx_end_out.push_back(nout);
          rounds_done++;
        end
      end
    end
  end

  function automatic int ref_word(int k);
    if (k < 0 || k >= model.core_out.size()) return -1;
    return model.core_out[k] & 32'hFFFF;
  endfunction

  initial begin
    automatic int h2[], h3[];
    int start;
    stage_coefs(h2, h3);
    model = new(h2, h3);
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (rounds_done == 2);
    // round 0: outputs 0 .. DEPTH-1
    checks++;
    if (first_start_out < DEPTH) begin
      failures++;
      $display("sending started after %0d outputs", first_start_out);
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (words[i] != ref_word(i)) begin
        failures++;
        if (failures < 8) $display("round 0 word %0d: got %0d expected %0d", i, words[i], ref_word(i));
      end
    end
    // round 1: DEPTH consecutive outputs starting with the first one after round 0
    // was sent (one output of slack for the end-of-transmission instant)
    start = -1;
    for (int k = tx_end_out[0] - 1; k <= tx_end_out[0] + 1; k++)
      if (words[DEPTH] == ref_word(k) && words[DEPTH + 1] == ref_word(k + 1)) begin
        start = k; break;
      end
    checks++;
    if (start < 0) begin
      failures++;
      $display("round 1 does not start at output %0d", tx_end_out[0]);
      start = tx_end_out[0];
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (words[DEPTH + i] != ref_word(start + i)) begin
        failures++;
        if (failures < 12) $display("round 1 word %0d: got %0d expected %0d", i, words[DEPTH + i], ref_word(start + i));
      end
    end
    $display("outputs=%0d bytes_sent=%0d dropped=%0d rounds=%0d round1_start=%0d cic_wraps=%0d freq_switches=%0d",
             nout, bytes_sent, dropped, rounds_done, start, cic_wraps, freq_switches);
    checks++; if (bytes_sent != 4 * DEPTH) failures++;
    checks++; if (dropped == 0)       failures++;
    checks++; if (rounds_done < 2)    failures++;
    checks++; if (cic_wraps == 0)     failures++;
    checks++; if (freq_switches == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

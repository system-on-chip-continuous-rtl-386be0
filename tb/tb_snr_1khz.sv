// Spectral test of the filter core: in-band signal-to-noise ratio of the 48.8 kHz
// output for a 1 kHz-range sine from the behavioural second-order modulator.
//
// The input frequency is chosen coherent with the output record: 1024 output samples
// at 48828.125 Hz hold exactly 21 periods (f = 1001.3 Hz). The amplitude is 0.25 of full
// scale around mid-scale, i.e. 256 output LSB around 512. After the start-up transient
// (64 outputs) 1024 outputs are collected and a direct DFT is taken. Signal power is the
// power in bin 21; noise is the power in all other bins from 1 up to 20 kHz (bin 419).
// Checks: the sine arrives with amplitude 256 within 0.5 dB (the passband gain of both
// FIR stages), and the SNR exceeds 50 dB. The bound is set by the output word itself:
// truncating to 1 LSB with a 256 LSB amplitude limits the SNR to about 56 dB.
module tb_snr_1khz;
  localparam int N    = 1024;
  localparam int BIN  = 21;
  localparam int SKIP = 64;
  localparam real FS_IN  = 6.25e6;
  localparam real FS_OUT = 6.25e6 / 128.0;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, pulseIN, reqNewData, isNewSample;
  logic [15:0] dataOUT;
  real vin = 0.5;
  int  nbits = 0, nout = 0;
  real x [N];
  int checks = 0, failures = 0;

  filter_core dut (.*);
  noise_shaper_model modulator (.clk, .rst, .sample(reqNewData), .vin, .bit_out(pulseIN));

  always #10 clk = ~clk;

  initial begin
    #40ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (!rst && reqNewData) begin
      nbits <= nbits + 1;
      vin <= 0.5 + 0.25 * $sin(2.0 * PI * (real'(BIN) * FS_OUT / real'(N)) * real'(nbits + 1) / FS_IN);
    end
    if (!rst && isNewSample) begin
      if (nout >= SKIP && nout < SKIP + N) x[nout - SKIP] = real'($signed(dataOUT));
      nout <= nout + 1;
    end
  end

  initial begin
    real mean, re, im, p, psig, pnoise, snr, amp;
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (nout >= SKIP + N);
    mean = 0.0;
    for (int i = 0; i < N; i++) mean += x[i];
    mean /= real'(N);
    psig = 0.0;
    pnoise = 0.0;
    for (int k = 1; real'(k) * FS_OUT / real'(N) <= 20000.0; k++) begin
      re = 0.0;
      im = 0.0;
      for (int i = 0; i < N; i++) begin
        re += (x[i] - mean) * $cos(2.0 * PI * real'(k * i) / real'(N));
        im -= (x[i] - mean) * $sin(2.0 * PI * real'(k * i) / real'(N));
      end
      p = (re * re + im * im) / (real'(N) * real'(N));
      if (k == BIN) psig = p;
      else          pnoise += p;
    end
    amp = 2.0 * $sqrt(psig);
    snr = 10.0 * $log10(psig / pnoise);
    $display("mean=%0.2f amplitude=%0.2f LSB in-band SNR=%0.2f dB", mean, amp, snr);
    checks++;
    if (amp < 256.0 * 0.944 || amp > 256.0 * 1.059) failures++;
    checks++;
    if (snr < 50.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

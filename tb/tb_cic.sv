// Self-checking test of the CIC decimator at its default sizes (8 clocks per input bit,
// decimation 32). A random bit stream, then an all-ones stream and then an all-zeros
// stream are fed in step with `reqNewData`; every output word is compared with the
// direct-form triangular filter of the reference model. Also checked: one
// `reqNewData` per 8 clocks, one output per 256 clocks, and the settled value 1024
// (the filter's DC gain) for the all-ones input.
module tb_cic;
  import sdadc_ref_pkg::*;
  logic clk = 0, rst = 1, pulseIN = 0;
  logic [15:0] dataOUT;
  logic isNewSample, reqNewData;
  int checks = 0, failures = 0;
  cic_model model;
  int expq[$];
  int nbits = 0, nout = 0, last_out = -1, last_req = -1, cyc = 0, ones_full = 0;

  cic dut (.*);

  always #10 clk = ~clk;

  initial begin
    #50ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit next_bit(int n);
    if (n < 4000) return 1'($urandom);
    if (n < 6000) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    int y;
    cyc <= cyc + 1;
    if (!rst && reqNewData) begin
      // the bit on pulseIN is taken at this edge
      if (model.push(pulseIN, y)) expq.push_back(y);
      nbits <= nbits + 1;
      pulseIN <= next_bit(nbits + 1);
      if (last_req >= 0) begin
        checks++;
        if (cyc - last_req != 8) failures++;
      end
      last_req <= cyc;
    end
    if (!rst && isNewSample) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("output without expected value");
      end else begin
        automatic int e = expq.pop_front();
        if (int'(dataOUT) != e) begin
          failures++;
          if (failures < 8) $display("out %0d: got %0d expected %0d", nout, dataOUT, e);
        end
        if (e == 1024) ones_full++;
      end
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != 256) failures++;
      end
      last_out <= cyc;
      nout <= nout + 1;
    end
  end

  initial begin
    model = new(32);
    pulseIN = next_bit(0);
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (nbits >= 8000);
    repeat (600) @(posedge clk);
    checks++;
    if (nout < 240) failures++;
    checks++;
    if (ones_full < 10) failures++;
    $display("outputs=%0d settled_at_1024=%0d", nout, ones_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

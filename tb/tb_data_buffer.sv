// Self-checking test of the capture buffer with a reduced depth of 16 words and a
// transmitter stand-in that answers each `send` with `istxDone` after a random delay.
// Three fill/empty rounds are run with a new word offered every 40 clocks: each round
// must send the 16 words captured in that round, in order, low byte first, and words
// offered while the buffer is emptying must be dropped (counted, and required to
// happen).
module tb_data_buffer;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst = 1, writeData = 0, istxDone = 0, send;
  logic [15:0] dataIN = 0;
  logic [7:0] data2send;
  int checks = 0, failures = 0;
  logic [7:0]  bytes[$];
  int busy = 0, dropped = 0, rounds = 0;

  data_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Transmitter stand-in.
  always @(posedge clk) begin
    istxDone <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) istxDone <= 1'b1;
    end
    if (send) begin
      checks++;
      if (busy != 0) failures++;           // never two sends without a done between
      busy <= 5 + $urandom % 30;
      bytes.push_back(data2send);
    end
  end

  // Word source: one word every 40 clocks, all offered words recorded in order.
  logic [15:0] offered_w[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && cyc % 40 == 0) begin
      automatic logic [15:0] w = 16'($urandom);
      writeData <= 1'b1;
      dataIN    <= w;
      offered_w.push_back(w);
    end else begin
      writeData <= 1'b0;
    end
  end

  // Each round must deliver DEPTH consecutive offered words; the first round must start
  // with the first word offered after reset, and every later round must start after the
  // words that were dropped while the previous round was being sent.
  initial begin
    automatic int pos = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (rounds < 3) begin
      int start;
      wait (bytes.size() == 2 * DEPTH);
      start = -1;
      for (int i = pos; i < offered_w.size(); i++)
        if (offered_w[i] == {bytes[1], bytes[0]}) begin start = i; break; end
      checks++;
      if (start < 0 || (rounds == 0 && start != 0) || (rounds > 0 && start <= pos)) begin
        failures++;
        $display("round %0d starts at offered word %0d (previous end %0d)", rounds, start, pos);
      end
      if (rounds > 0 && start > pos) dropped += start - pos;
      if (start < 0) start = 0;
      for (int i = 0; i < int'(DEPTH); i++) begin
        checks++;
        if (start + i >= offered_w.size() || {bytes[2*i+1], bytes[2*i]} !== offered_w[start + i]) begin
          failures++;
          if (failures < 6) $display("round %0d word %0d: got %h", rounds, i, {bytes[2*i+1], bytes[2*i]});
        end
      end
      pos = start + int'(DEPTH);
      bytes.delete();
      rounds++;
    end
    checks++;
    if (dropped == 0) failures++;
    $display("rounds=%0d offered=%0d dropped=%0d", rounds, offered_w.size(), dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

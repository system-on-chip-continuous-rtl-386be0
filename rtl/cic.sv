// CIC decimation stage: two integrators, decimation by 32, two combs.
//
// The 1-bit modulator stream `pulseIN` is zero padded to a 16-bit unsigned word and
// filtered by H(z) = ((1 - z^-32) / (1 - z^-1))^2, a 63-tap triangular window with DC
// gain 32^2 = 1024. The clock runs at 50 MHz; a 3-bit counter makes one integrator
// enable every 8 clocks (6.25 MHz input rate) and a 5-bit counter of those enables
// makes one comb enable every 32 input samples (195.3125 kHz output rate).
//
// Interface and timing:
//  * `reqNewData` is high for one clock in the cycle where `pulseIN` is sampled; the
//    bit source should present the next bit after that clock edge.
//  * `isNewSample` is a one-clock pulse, once per 256 clocks, marking the cycle in
//    which a new value of `dataOUT` is first visible. `dataOUT` then holds until the
//    next output, 256 clocks later.
// The section count, decimation factor, 16-bit word length, the delayed enables of the
// second integrator and second comb, and the held sample between integrators and combs
// follow the document. `pulseIN` is taken to be synchronous to `clk`; counter phases,
// reset values and the exact pulse timing are this design's choice.
module cic
  import sdadc_pkg::*;
#(
  parameter int unsigned CLKS_PER_INPUT = 8,   // 50 MHz / 6.25 MHz
  parameter int unsigned DECIMATION     = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                pulseIN,
  output logic [WORD_LEN-1:0] dataOUT,
  output logic                isNewSample,
  output logic                reqNewData
);

  localparam int unsigned IW = (CLKS_PER_INPUT > 1) ? $clog2(CLKS_PER_INPUT) : 1;
  localparam int unsigned CW = (DECIMATION > 1) ? $clog2(DECIMATION) : 1;

  logic [IW-1:0] int_cnt;
  logic [CW-1:0] comb_cnt;
  logic          en_int, en_int_d, en_comb, en_comb_d;
  logic [WORD_LEN-1:0] padded, int1_out, int2_out, held, comb_in, comb1_out;

  // Input-rate enable.
  assign en_int     = (int_cnt == IW'(CLKS_PER_INPUT - 1));
  assign reqNewData = en_int;

  always_ff @(posedge clk) begin
    if (rst) begin
      int_cnt   <= '0;
      comb_cnt  <= '0;
      en_int_d  <= 1'b0;
      en_comb   <= 1'b0;
      en_comb_d <= 1'b0;
      isNewSample <= 1'b0;
    end else begin
      int_cnt  <= en_int ? '0 : int_cnt + 1'b1;
      en_int_d <= en_int;
      // Count the updates of the second integrator; the comb enable comes one clock
      // after the update that completes a block of DECIMATION samples.
      if (en_int_d)
        comb_cnt <= (comb_cnt == CW'(DECIMATION - 1)) ? '0 : comb_cnt + 1'b1;
      en_comb     <= en_int_d && (comb_cnt == CW'(DECIMATION - 1));
      en_comb_d   <= en_comb;
      isNewSample <= en_comb_d;
    end
  end

  assign padded = {{(WORD_LEN-1){1'b0}}, pulseIN};

  cic_integrator #(.WIDTH(WORD_LEN)) integrator1 (
    .clk, .rst, .enable(en_int),   .inData(padded),   .outData(int1_out));
  cic_integrator #(.WIDTH(WORD_LEN)) integrator2 (
    .clk, .rst, .enable(en_int_d), .inData(int1_out), .outData(int2_out));

  // Rate change: the integrator output is passed on in the comb-enable cycle and held
  // otherwise.
  assign comb_in = en_comb ? int2_out : held;
  always_ff @(posedge clk) begin
    if (rst) held <= '0;
    else     held <= comb_in;
  end

  cic_comb #(.WIDTH(WORD_LEN)) comb1 (
    .clk, .rst, .enable(en_comb),   .inData(comb_in),   .outData(comb1_out));
  cic_comb #(.WIDTH(WORD_LEN)) comb2 (
    .clk, .rst, .enable(en_comb_d), .inData(comb1_out), .outData(dataOUT));

endmodule

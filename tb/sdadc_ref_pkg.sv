// Reference models of the decimation chain, used by the testbenches to predict the
// filter outputs independently of the RTL structure.
//
// The models work on the filter equations, not on the hardware schedule:
//  * cic_model:  y[m] = sum_{k=0}^{62} w[k] * x[32(m+1)-1-k], w[k] = min(k+1, 63-k),
//                the direct-form impulse response of ((1 - z^-32)/(1 - z^-1))^2 sampled
//                after every 32nd input bit;
//  * fir_model:  y[m] = floor( sum_j h[j] * x[2m - j] / 2^15 ), one output per two
//                inputs, the first input producing the first output;
//  * chain_model: the cascade CIC -> FIR stage 2 -> FIR stage 3.
// Samples before the first input count as zero.
package sdadc_ref_pkg;

  class cic_model;
    int unsigned decim;
    bit          hist[$];   // newest bit last
    int unsigned n;

    function new(int unsigned decim_factor = 32);
      decim = decim_factor;
      n = 0;
    endfunction

    // Push one input bit; returns 1 with the new output word in y after every
    // `decim` bits.
    function bit push(bit b, output int y);
      int unsigned len = 2 * decim - 1;
      hist.push_back(b);
      if (hist.size() > len) void'(hist.pop_front());
      n++;
      y = 0;
      if (n % decim != 0) return 0;
      for (int unsigned k = 0; k < len && k < hist.size(); k++) begin
        int unsigned w = (k < decim) ? k + 1 : len - k;
        if (hist[hist.size() - 1 - k]) y += int'(w);
      end
      y &= 32'h0000_FFFF;
      return 1;
    endfunction
  endclass

  class fir_model;
    int          h[];
    int          hist[$];   // newest sample last
    int unsigned n;

    function new(int coefs[]);
      h = coefs;
      n = 0;
    endfunction

    // Push one 16-bit input word (taken as signed); returns 1 with the truncated output
    // word (as a signed 16-bit value) in y for every second input, starting with the
    // first.
    function bit push(int x, output int y);
      longint acc = 0;
      hist.push_back(int'($signed(16'(x))));
      if (hist.size() > h.size()) void'(hist.pop_front());
      n++;
      y = 0;
      if (n % 2 != 1) return 0;
      for (int j = 0; j < h.size() && j < hist.size(); j++)
        acc += longint'(h[j]) * longint'(hist[hist.size() - 1 - j]);
      y = int'($signed(16'(acc >>> 15)));
      return 1;
    endfunction
  endclass

  class chain_model;
    cic_model c;
    fir_model f2, f3;
    int cic_out[$];
    int fir2_out[$];
    int core_out[$];

    function new(int h2[], int h3[]);
      c  = new(32);
      f2 = new(h2);
      f3 = new(h3);
    endfunction

    function void push_bit(bit b);
      int y1, y2, y3;
      if (c.push(b, y1)) begin
        cic_out.push_back(y1);
        if (f2.push(y1, y2)) begin
          fir2_out.push_back(y2);
          if (f3.push(y2, y3)) core_out.push_back(y3);
        end
      end
    endfunction
  endclass

  // The coefficient sets of the two FIR stages, as plain integers for the models.
  function automatic void stage_coefs(output int h2[], output int h3[]);
    h2 = '{-262, -1352, 575, 9484, 15878, 9484, 575, -1352, -262};
    h3 = '{176, -31, -714, -255, 1326, 308, -2992, -419, 10254, 17462, 10254, -419,
           -2992, 308, 1326, -255, -714, -31, 176};
  endfunction

endpackage

// fir_pkg: constants shared by the block FIR filter.
//
// The filter is a transpose-form block FIR with block size L = 4 and N = 16
// taps, so M = N/L = 4 coefficient groups c_m = {h(mL), ..., h(mL+L-1)}.
// L and N follow the worked example of the design. The sample width B, the
// coefficient width BH and the coefficient values themselves are this
// design's own choice: an 8-bit signed, symmetric (linear-phase) low-pass set.
// The accumulation width BY = B + BH + log2(N) holds any sum of N products
// without overflow.
package fir_pkg;

  parameter int unsigned L  = 4;           // block size
  parameter int unsigned N  = 16;          // filter length
  parameter int unsigned M  = N / L;       // number of coefficient groups
  parameter int unsigned B  = 8;           // input sample width
  parameter int unsigned BH = 8;           // coefficient width
  parameter int unsigned BP = B + BH;      // product width
  parameter int unsigned BY = BP + $clog2(N); // inner-product / output width

  typedef logic signed [BH-1:0] coef_t;

  // h(0) .. h(N-1): symmetric low-pass taps.
  parameter coef_t H_DEFAULT [N] = '{
    -8'sd1, -8'sd3, -8'sd4,  8'sd2, 8'sd10, 8'sd23, 8'sd35, 8'sd42,
     8'sd42, 8'sd35, 8'sd23, 8'sd10, 8'sd2, -8'sd4, -8'sd3, -8'sd1
  };

  // Canonic signed digit k (-1, 0 or +1) of the value c, LSB first.
  // Built with the usual rule: digit = 2 - (c mod 4) when c is odd.
  function automatic int csd_digit(input int c, input int k);
    int v;
    int d;
    v = c;
    d = 0;
    for (int i = 0; i <= k; i++) begin
      if ((v % 2) != 0) begin
        d = 2 - (((v % 4) + 4) % 4);
        v = v - d;
      end else begin
        d = 0;
      end
      v = v / 2;
    end
    return d;
  endfunction

  // Odd part of |c| ("fundamental"): |c| = odd_part(c) * 2^pow2_part(c).
  // Both are 0 for c = 0.
  function automatic int odd_part(input int c);
    int v;
    v = (c < 0) ? -c : c;
    if (v == 0) return 0;
    while ((v % 2) == 0) v = v / 2;
    return v;
  endfunction

  function automatic int pow2_part(input int c);
    int v;
    int s;
    v = (c < 0) ? -c : c;
    s = 0;
    if (v == 0) return 0;
    while ((v % 2) == 0) begin
      v = v / 2;
      s++;
    end
    return s;
  endfunction

endpackage

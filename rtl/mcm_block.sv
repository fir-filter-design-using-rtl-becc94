// mcm_block: multiple constant multiplication for one input sample.
//
// The block multiplies the sample x = x(kL-J) by every coefficient that
// sample meets in one output block: h(mL+i) for m = 0..M-1 and
// i = IMIN..IMAX, where IMIN = max(0, J-L+1) and IMAX = min(L-1, J). For
// L = 4 that is 4, 8, 12, 16, 12, 8, 4 constants for J = 0..6.
//
// No multiplier is used. Every constant is split at elaboration time into a
// sign, a power of two and an odd "fundamental" f: h = +/- f * 2^s. Each
// distinct fundamental of the block is built once from x by shift-add in
// canonic signed digit (CSD) form (f = 1 needs no adder), and every product
// is the shared fundamental, shifted by wires and negated if needed. Equal
// constants (the two halves of a symmetric filter), constants of opposite
// sign and constants that differ by a power of two therefore share one
// adder chain.
// Output prod[m][t] = h(mL + IMIN + t) * x. Combinational.
// The per-sample MCM organisation follows the design; the fundamental
// sharing and the CSD form are this design's own realisation of the
// common-subexpression idea, since the design does not list the
// subexpressions it extracts.
module mcm_block #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned N  = fir_pkg::N,
  parameter int unsigned B  = fir_pkg::B,
  parameter int unsigned BH = fir_pkg::BH,
  parameter int unsigned J  = 0,
  parameter logic signed [BH-1:0] H [N] = fir_pkg::H_DEFAULT,
  parameter int unsigned M    = N / L,
  parameter int unsigned IMIN = (J >= L) ? J - L + 1 : 0,
  parameter int unsigned IMAX = (J < L) ? J : L - 1,
  parameter int unsigned NI   = IMAX - IMIN + 1
) (
  input  logic signed [B-1:0]    x,
  output logic signed [B+BH-1:0] prod [M][NI]
);
  localparam int unsigned BP = B + BH;
  localparam int unsigned NQ = M * NI;      // products of this block

  // coefficient of product q = m*NI + t
  function automatic int coef_of(int q);
    return int'(H[(q / NI) * L + IMIN + (q % NI)]);
  endfunction

  // first product of the block with the same fundamental as product q
  function automatic int rep_of(int q);
    for (int p = 0; p < q; p++)
      if (fir_pkg::odd_part(coef_of(p)) == fir_pkg::odd_part(coef_of(q))) return p;
    return q;
  endfunction

  logic signed [BP-1:0] xe;
  logic signed [BP-1:0] fund [NQ];   // fund[q] valid where rep_of(q) == q

  assign xe = BP'(x);

  for (genvar q = 0; q < NQ; q++) begin : g_q
    localparam int C   = coef_of(q);
    localparam int F   = fir_pkg::odd_part(C);
    localparam int S   = fir_pkg::pow2_part(C);
    localparam int REP = rep_of(q);

    if (REP == q) begin : g_fund
      // fundamental F * x by CSD shift-add
      logic signed [BP-1:0] term [BH+1];
      for (genvar k = 0; k <= BH; k++) begin : g_k
        localparam int D = fir_pkg::csd_digit(F, k);
        if (D > 0) begin : g_add
          assign term[k] = xe <<< k;
        end else if (D < 0) begin : g_sub
          assign term[k] = -(xe <<< k);
        end else begin : g_zero
          assign term[k] = '0;
        end
      end
      always_comb begin
        fund[q] = '0;
        for (int k = 0; k <= BH; k++) fund[q] = fund[q] + term[k];
      end
    end else begin : g_shared
      assign fund[q] = '0;   // this product reuses fund[REP]
    end

    if (C < 0) begin : g_neg
      assign prod[q / NI][q % NI] = -(fund[REP] <<< S);
    end else begin : g_pos
      assign prod[q / NI][q % NI] = fund[REP] <<< S;
    end
  end
endmodule

// mrca_slice: one G-bit slice of the modified ripple carry adder.
//
// The slice holds G+1 full-adder cells for G bits: cells 0..G-1 are the
// normal ripple chain and cell G is a spare (FA5 for G = 4). The input
// `skip` names the one cell that is taken out of the chain; the cells above
// it move up by one position. Three groups of 2:1 multiplexers, whose select
// vectors keep the names they carry in the slice drawing, do the re-routing:
//   sel [G-2:0]  operand muxes (M10..M15): cell j takes a[j-1], b[j-1]
//                instead of a[j], b[j] when it sits above the skipped cell;
//   sel2[G-1:0]  carry muxes (M6..M9): the carry into cell j bypasses cell
//                j-1 when that cell is the skipped one;
//   sel1[G:0]    output muxes (M1..M5): sum[i] comes from cell i+1 instead
//                of cell i at and above the skipped cell, and cout from
//                cell G instead of cell G-1 when the spare is in use.
// skip = G leaves the spare idle (plain ripple carry adder). Every value of
// skip gives the same sum; skip > G is treated as G. Combinational.
//
// The cell count, the mux names and their select names come from the
// drawing of the adder; how the selects are derived from a single skip code
// is this design's own reading of it.
module mrca_slice #(
  parameter int unsigned G  = 4,
  parameter int unsigned SW = $clog2(G + 1)
) (
  input  logic [G-1:0]  a,
  input  logic [G-1:0]  b,
  input  logic          cin,
  input  logic [SW-1:0] skip,
  output logic [G-1:0]  sum,
  output logic          cout
);
  logic [G-2:0] sel;
  logic [G-1:0] sel2;
  logic [G:0]   sel1;
  logic [G:0]   fa_a, fa_b, fa_ci, fa_s, fa_co;
  int unsigned  skip_i;

  always_comb begin
    skip_i = (int'(skip) > int'(G)) ? G : int'(skip);
    for (int unsigned j = 1; j < G; j++) sel[j-1] = (j > skip_i);
    for (int unsigned j = 1; j <= G; j++) sel2[j-1] = (skip_i == j - 1);
    for (int unsigned i = 0; i <= G; i++) sel1[i] = (i >= skip_i) && (skip_i < G);
  end

  // operand muxes
  always_comb begin
    fa_a[0] = a[0];
    fa_b[0] = b[0];
    for (int unsigned j = 1; j < G; j++) begin
      fa_a[j] = sel[j-1] ? a[j-1] : a[j];
      fa_b[j] = sel[j-1] ? b[j-1] : b[j];
    end
    fa_a[G] = a[G-1];
    fa_b[G] = b[G-1];
  end

  // carry muxes
  assign fa_ci[0] = cin;
  for (genvar j = 1; j <= G; j++) begin : g_cmux
    assign fa_ci[j] = sel2[j-1] ? fa_ci[j-1] : fa_co[j-1];
  end

  for (genvar j = 0; j <= G; j++) begin : g_fa
    full_adder u_fa (
      .a (fa_a[j]), .b (fa_b[j]), .ci(fa_ci[j]),
      .s (fa_s[j]), .co(fa_co[j])
    );
  end

  // output muxes
  always_comb begin
    for (int unsigned i = 0; i < G; i++)
      sum[i] = sel1[i] ? fa_s[i+1] : fa_s[i];
    cout = sel1[G] ? fa_co[G] : fa_co[G-1];
  end
endmodule

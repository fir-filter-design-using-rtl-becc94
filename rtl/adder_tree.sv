// adder_tree: balanced tree of NIN-1 two-input adders.
//
// Adds NIN signed BI-bit operands into one signed BO-bit sum. The operands
// are sign-extended to BO bits and added pairwise, level by level, so the
// depth is ceil(log2(NIN)) adders (for NIN = 4: two adders, then one, as in
// the inner product cell drawing). BO must be wide enough for the sum.
// Combinational.
module adder_tree #(
  parameter int unsigned NIN = 4,
  parameter int unsigned BI  = 16,
  parameter int unsigned BO  = 20
) (
  input  logic signed [BI-1:0] in [NIN],
  output logic signed [BO-1:0] sum
);
  localparam int unsigned NP = 1 << $clog2(NIN);   // padded leaf count

  // node[1] is the root; node[NP + i] are the leaves.
  logic signed [BO-1:0] node [1:2*NP-1];

  always_comb begin
    for (int i = 0; i < NP; i++)
      node[NP+i] = (i < NIN) ? BO'(in[i]) : '0;
    for (int n = NP - 1; n >= 1; n--)
      node[n] = node[2*n] + node[2*n+1];
    sum = node[1];
  end
endmodule

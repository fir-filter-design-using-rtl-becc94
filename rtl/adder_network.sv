// adder_network: forms the inner products of the MCM-based block FIR.
//
// Input p[m][l][i] is the MCM product h(mL+i) * x(kL-l-i); the network adds
// the L products of each (m, l) pair into
//   r[m][l] = sum_{i=0}^{L-1} h(mL+i) * x(kL-l-i),
// which is the inner product r_k^m of the block formulation (the output an
// inner product cell would give). Products are sign-extended to BY bits and
// added in a balanced tree of L-1 adders per output. Combinational.
module adder_network #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned M  = fir_pkg::M,
  parameter int unsigned BP = fir_pkg::BP,
  parameter int unsigned BY = fir_pkg::BY
) (
  input  logic signed [BP-1:0] p [M][L][L],
  output logic signed [BY-1:0] r [M][L]
);
  for (genvar m = 0; m < M; m++) begin : g_m
    for (genvar l = 0; l < L; l++) begin : g_l
      adder_tree #(.NIN(L), .BI(BP), .BO(BY)) u_tree (
        .in (p[m][l]),
        .sum(r[m][l])
      );
    end
  end
endmodule

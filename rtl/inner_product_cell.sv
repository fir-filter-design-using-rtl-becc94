// inner_product_cell: one inner product cell (IPC) of the block FIR.
//
// Takes a coefficient vector c = {h(mL), .., h(mL+L-1)} and a sample vector
// x = x_k^l = {x(kL-l), .., x(kL-l-L+1)} and returns
//   r = sum_{i=0}^{L-1} c[i] * x[i]   = r(kL-l) of group m,
// using L multipliers and L-1 adders in a balanced tree (for L = 4: two
// adders, then one). Combinational. The structure follows the design; the
// widths are this design's choice.
module inner_product_cell #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned B  = fir_pkg::B,
  parameter int unsigned BH = fir_pkg::BH,
  parameter int unsigned BY = fir_pkg::BY
) (
  input  logic signed [BH-1:0] c [L],
  input  logic signed [B-1:0]  x [L],
  output logic signed [BY-1:0] r
);
  localparam int unsigned BP = B + BH;
  logic signed [BP-1:0] prod [L];

  always_comb begin
    for (int i = 0; i < L; i++) prod[i] = BP'(c[i]) * BP'(x[i]);
  end

  adder_tree #(.NIN(L), .BI(BP), .BO(BY)) u_tree (.in(prod), .sum(r));
endmodule

// inner_product_unit: one inner product unit (IPU) of the block FIR.
//
// L inner product cells share the coefficient vector c_m; cell l receives
// the sample vector x_k^l = xs[l] and yields r[l] = r_k^m[l], the
// contribution of group m to output y(kL-l). Combinational.
module inner_product_unit #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned B  = fir_pkg::B,
  parameter int unsigned BH = fir_pkg::BH,
  parameter int unsigned BY = fir_pkg::BY
) (
  input  logic signed [BH-1:0] c  [L],
  input  logic signed [B-1:0]  xs [L][L],
  output logic signed [BY-1:0] r  [L]
);
  for (genvar l = 0; l < L; l++) begin : g_ipc
    inner_product_cell #(.L(L), .B(B), .BH(BH), .BY(BY)) u_ipc (
      .c(c), .x(xs[l]), .r(r[l])
    );
  end
endmodule

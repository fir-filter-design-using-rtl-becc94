// fir_top: the block FIR filter in its two forms, side by side.
//
// mcm_fir is the fixed-coefficient filter whose products come from
// multiple constant multiplication (shift-add, no multipliers); mult_fir is
// the same block filter built from the coefficient storage unit and
// multiplier-based inner product units. Both use the register unit and the
// pipelined adder unit of modified ripple carry adders. Each has its own
// ports (prefix mcm_ and mul_); they share only clock and reset. With equal
// inputs and the default coefficients the two produce equal outputs.
// Block size L = 4, N = 16 taps, 8-bit samples and coefficients, 20-bit
// outputs; see mcm_fir and mult_fir for the timing.
module fir_top #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned N  = fir_pkg::N,
  parameter int unsigned B  = fir_pkg::B,
  parameter int unsigned BH = fir_pkg::BH,
  parameter int unsigned BY = B + BH + $clog2(N),
  parameter int unsigned G  = 4,
  parameter int unsigned NS = (BY + G - 1) / G,
  parameter int unsigned SW = $clog2(G + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // MCM filter
  input  logic                 mcm_in_valid,
  input  logic signed [B-1:0]  mcm_x_k [L],
  input  logic [SW-1:0]        mcm_rca_skip [NS],
  output logic                 mcm_out_valid,
  output logic signed [BY-1:0] mcm_y_k [L],
  // multiplier-based filter
  input  logic                 mul_coef_reload,
  input  logic                 mul_in_valid,
  output logic                 mul_in_ready,
  input  logic signed [B-1:0]  mul_x_k [L],
  input  logic [SW-1:0]        mul_rca_skip [NS],
  output logic                 mul_out_valid,
  output logic signed [BY-1:0] mul_y_k [L]
);
  mcm_fir #(.L(L), .N(N), .B(B), .BH(BH), .BY(BY), .G(G), .NS(NS), .SW(SW)) u_mcm (
    .clk, .rst_n,
    .in_valid (mcm_in_valid),
    .x_k      (mcm_x_k),
    .rca_skip (mcm_rca_skip),
    .out_valid(mcm_out_valid),
    .y_k      (mcm_y_k)
  );

  mult_fir #(.L(L), .N(N), .B(B), .BH(BH), .BY(BY), .G(G), .NS(NS), .SW(SW)) u_mul (
    .clk, .rst_n,
    .coef_reload(mul_coef_reload),
    .in_valid   (mul_in_valid),
    .in_ready   (mul_in_ready),
    .x_k        (mul_x_k),
    .rca_skip   (mul_rca_skip),
    .out_valid  (mul_out_valid),
    .y_k        (mul_y_k)
  );
endmodule

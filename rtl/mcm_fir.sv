// mcm_fir: fixed-coefficient block FIR filter built on multiple constant
// multiplication (MCM).
//
// Block size L, length N, M = N/L coefficient groups. Each cycle with
// in_valid high the filter takes L samples x_k[i] = x(kL-i) and returns L
// outputs y_k[l] = y(kL-l) = sum_{n=0}^{N-1} h(n) x(kL-l-n) in the same
// cycle (out_valid = in_valid). Structure:
//   register_unit        keeps L-1 samples of the previous block and forms
//                        the 2L-1 samples x(kL) .. x(kL-2L+2);
//   mcm_block (x 2L-1)   one per sample, multiplies it by every coefficient
//                        it meets (4, 8, 12, 16, 12, 8, 4 constants for L = 4)
//                        with CSD shift-add;
//   adder_network        adds the products into the inner products r_k^m;
//   pipelined_adder_unit transpose-form accumulation over the M groups with
//                        modified ripple carry adders.
// The coefficients are the parameter H (default: fir_pkg::H_DEFAULT). The
// structure follows the design; widths, coefficient values, the valid
// signal and reset are this design's choices. rca_skip sets the bypass of
// the modified ripple carry adders (all entries G: no bypass).
module mcm_fir #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned N  = fir_pkg::N,
  parameter int unsigned B  = fir_pkg::B,
  parameter int unsigned BH = fir_pkg::BH,
  parameter int unsigned BY = B + BH + $clog2(N),
  parameter logic signed [BH-1:0] H [N] = fir_pkg::H_DEFAULT,
  parameter int unsigned G  = 4,
  parameter int unsigned NS = (BY + G - 1) / G,
  parameter int unsigned SW = $clog2(G + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [B-1:0]  x_k [L],
  input  logic [SW-1:0]        rca_skip [NS],
  output logic                 out_valid,
  output logic signed [BY-1:0] y_k [L]
);
  localparam int unsigned M  = N / L;
  localparam int unsigned BP = B + BH;

  logic signed [B-1:0]  win [2*L-1];
  logic signed [BP-1:0] p   [M][L][L];
  logic signed [BY-1:0] r   [M][L];

  register_unit #(.L(L), .B(B)) u_ru (
    .clk, .rst_n, .in_valid, .x_k, .win, .xs()  // the MCM path reads win only
  );

  for (genvar j = 0; j < 2 * L - 1; j++) begin : g_mcm
    localparam int unsigned IMIN = (j >= L) ? j - L + 1 : 0;
    localparam int unsigned IMAX = (j < L) ? j : L - 1;
    localparam int unsigned NI   = IMAX - IMIN + 1;
    logic signed [BP-1:0] prod [M][NI];

    mcm_block #(.L(L), .N(N), .B(B), .BH(BH), .J(j), .H(H)) u_mcm (
      .x(win[j]), .prod(prod)
    );
    // product h(mL+i) * x(kL-j) belongs to lane l = j - i
    for (genvar m = 0; m < M; m++) begin : g_m
      for (genvar t = 0; t < NI; t++) begin : g_t
        assign p[m][j-IMIN-t][IMIN+t] = prod[m][t];
      end
    end
  end

  adder_network #(.L(L), .M(M), .BP(BP), .BY(BY)) u_an (.p, .r);

  pipelined_adder_unit #(.L(L), .M(M), .BY(BY), .G(G), .NS(NS), .SW(SW)) u_pau (
    .clk, .rst_n, .in_valid, .r, .rca_skip, .y(y_k)
  );

  assign out_valid = in_valid;
endmodule

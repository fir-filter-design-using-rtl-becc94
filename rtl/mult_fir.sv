// mult_fir: multiplier-based block FIR filter (coefficient storage unit,
// register unit, inner product units, pipelined adder unit).
//
// Same block formulation as mcm_fir: per valid cycle L samples in,
// y_k[l] = y(kL-l) = sum_n h(n) x(kL-l-n) out in the same cycle. Here the
// products come from real multipliers: M inner product units, each of L
// inner product cells with L multipliers, that is LN multipliers in all.
// After reset the coefficient storage unit copies its ROM into N
// coefficient registers, one word per cycle; in_ready stays low for those
// N cycles and input blocks offered then are not taken. out_valid =
// in_valid && in_ready. The structure follows the design; the coefficient
// registers and the ready handshake are this design's choice.
module mult_fir #(
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
  input  logic                 coef_reload,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [B-1:0]  x_k [L],
  input  logic [SW-1:0]        rca_skip [NS],
  output logic                 out_valid,
  output logic signed [BY-1:0] y_k [L]
);
  localparam int unsigned M  = N / L;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned LW = $clog2(L);   // N and L are powers of two

  logic                 wr_en, done;
  logic [AW-1:0]        wr_addr;
  logic signed [BH-1:0] wr_data;
  logic signed [BH-1:0] coef_q [M][L];
  logic                 take;
  logic signed [B-1:0]  xs [L][L];
  logic signed [BY-1:0] r  [M][L];

  coeff_storage_unit #(.N(N), .BH(BH), .H(H), .AW(AW)) u_csu (
    .clk, .rst_n, .start(coef_reload), .wr_en, .wr_addr, .wr_data, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < M; m++)
        for (int i = 0; i < L; i++) coef_q[m][i] <= '0;
    end else if (wr_en) begin
      coef_q[wr_addr[AW-1:LW]][wr_addr[LW-1:0]] <= wr_data;
    end
  end

  assign in_ready = done;
  assign take     = in_valid && in_ready;

  register_unit #(.L(L), .B(B)) u_ru (
    .clk, .rst_n, .in_valid(take), .x_k, .win(), .xs
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    inner_product_unit #(.L(L), .B(B), .BH(BH), .BY(BY)) u_ipu (
      .c(coef_q[m]), .xs(xs), .r(r[m])
    );
  end

  pipelined_adder_unit #(.L(L), .M(M), .BY(BY), .G(G), .NS(NS), .SW(SW)) u_pau (
    .clk, .rst_n, .in_valid(take), .r, .rca_skip, .y(y_k)
  );

  assign out_valid = take;
endmodule

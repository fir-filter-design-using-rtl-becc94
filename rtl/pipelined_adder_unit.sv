// pipelined_adder_unit: transpose-form accumulation of a block FIR (PAU).
//
// Input r[m][l] holds the inner products r_k^m of the current block. The
// unit implements y_k = r_k^0 + z^-1( r_k^1 + z^-1( ... + z^-1 r_k^{M-1}))
// per output lane l, i.e.
//   y(kL-l) = sum_{m=0}^{M-1} r_{k-m}^m[l],
// with L(M-1) adders and L(M-1) registers of BY bits:
//   s[M-1] <= r[M-1];   s[m] <= r[m] + s[m+1]  (1 <= m <= M-2);
//   y      =  r[0] + s[1].
// Every adder is a modified ripple carry adder (mrca_adder); rca_skip is the
// bypass setting shared by all of them. The registers load when in_valid is
// high and reset to zero. y is combinational from r and the registers, so an
// output block leaves in the same cycle as the input block that completes it.
module pipelined_adder_unit #(
  parameter int unsigned L  = fir_pkg::L,
  parameter int unsigned M  = fir_pkg::M,
  parameter int unsigned BY = fir_pkg::BY,
  parameter int unsigned G  = 4,
  parameter int unsigned NS = (BY + G - 1) / G,
  parameter int unsigned SW = $clog2(G + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [BY-1:0] r [M][L],
  input  logic [SW-1:0]        rca_skip [NS],
  output logic signed [BY-1:0] y [L]
);
  // s[m] for m = 1..M-1; index 0 and M unused in storage.
  logic signed [BY-1:0] s_q [1:M-1][L];
  logic signed [BY-1:0] s_d [1:M-1][L];

  for (genvar l = 0; l < L; l++) begin : g_l
    // output adder
    mrca_adder #(.W(BY), .G(G), .NS(NS), .SW(SW)) u_out (
      .a(r[0][l]), .b(s_q[1][l]), .cin(1'b0), .skip(rca_skip),
      .sum(y[l]), .cout()
    );
    // inner adders
    for (genvar m = 1; m < M - 1; m++) begin : g_m
      mrca_adder #(.W(BY), .G(G), .NS(NS), .SW(SW)) u_add (
        .a(r[m][l]), .b(s_q[m+1][l]), .cin(1'b0), .skip(rca_skip),
        .sum(s_d[m][l]), .cout()
      );
    end
    assign s_d[M-1][l] = r[M-1][l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 1; m < M; m++)
        for (int l = 0; l < L; l++) s_q[m][l] <= '0;
    end else if (in_valid) begin
      for (int m = 1; m < M; m++)
        for (int l = 0; l < L; l++) s_q[m][l] <= s_d[m][l];
    end
  end
endmodule

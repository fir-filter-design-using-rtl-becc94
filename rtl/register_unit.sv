// register_unit: input register unit of the block FIR filter.
//
// Each cycle with in_valid high a block of L new samples arrives,
// x_k[i] = x(kL-i) for i = 0..L-1. The unit keeps the L-1 newest samples of
// the previous block in L-1 registers of B bits (x(kL-L) .. x(kL-2L+2)), so
// that together with the current block it can present the 2L-1 samples
// x(kL) .. x(kL-2L+2) that one block of outputs needs:
//   win[j]    = x(kL-j),          j = 0..2L-2   (one entry per MCM block)
//   xs[l][i]  = x(kL-l-i),        l, i = 0..L-1 (the L overlapping vectors
//                                                 x_k^l fed to the IPCs)
// Outputs are combinational from x_k and the registers; the registers load
// on the clock edge of a valid cycle. Reset clears them to zero, so the
// filter starts from an all-zero history (reset behaviour is this design's
// choice; the register count and width follow the design).
module register_unit #(
  parameter int unsigned L = fir_pkg::L,
  parameter int unsigned B = fir_pkg::B
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [B-1:0] x_k [L],
  output logic signed [B-1:0] win [2*L-1],
  output logic signed [B-1:0] xs  [L][L]
);
  logic signed [B-1:0] d_q [L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L - 1; i++) d_q[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < L - 1; i++) d_q[i] <= x_k[i];
    end
  end

  always_comb begin
    for (int j = 0; j < L; j++)     win[j] = x_k[j];
    for (int j = L; j < 2 * L - 1; j++) win[j] = d_q[j-L];
    for (int l = 0; l < L; l++)
      for (int i = 0; i < L; i++)
        xs[l][i] = win[l+i];
  end
endmodule

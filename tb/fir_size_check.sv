// fir_size_check: drives one mcm_fir and one mult_fir of block size L and
// length N (coefficients H) with the same random sample stream and compares
// both with a direct convolution computed here. Used by tb_fir_sizes to run
// the filters at sizes other than the default. Waits for the multiplier
// filter's coefficient load, then sends NBLK blocks, one per cycle with
// occasional idle cycles; raises done when finished.
module fir_size_check #(
  parameter int unsigned L    = 2,
  parameter int unsigned N    = 8,
  parameter logic signed [7:0] H [N] = '{default: 8'sd1},
  parameter int unsigned NBLK = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned B  = 8;
  localparam int unsigned BY = 16 + $clog2(N);
  localparam int unsigned G  = 4;
  localparam int unsigned NS = (BY + G - 1) / G;
  localparam int unsigned SW = $clog2(G + 1);

  logic in_valid = 0, coef_reload = 0, in_ready, mcm_ov, mul_ov;
  logic signed [B-1:0]  x_k [L];
  logic [SW-1:0]        skip [NS];
  logic signed [BY-1:0] y_mcm [L];
  logic signed [BY-1:0] y_mul [L];
  int hist [$];

  mcm_fir #(.L(L), .N(N), .H(H)) u_mcm (
    .clk, .rst_n, .in_valid, .x_k, .rca_skip(skip), .out_valid(mcm_ov), .y_k(y_mcm)
  );
  mult_fir #(.L(L), .N(N), .H(H)) u_mul (
    .clk, .rst_n, .coef_reload, .in_valid, .in_ready, .x_k, .rca_skip(skip),
    .out_valid(mul_ov), .y_k(y_mul)
  );

  function automatic int ref_y(int n);
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += int'(H[i]) * hist[n-i];
    return acc;
  endfunction

  initial begin
    int base, e;
    checks = 0;
    failures = 0;
    done = 0;
    for (int i = 0; i < L; i++) x_k[i] = '0;
    for (int s = 0; s < NS; s++) skip[s] = SW'(G);
    @(posedge rst_n);
    while (!in_ready) @(negedge clk);
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < L; i++) x_k[i] = B'($urandom);
      for (int s = 0; s < NS; s++) skip[s] = SW'($urandom % (G + 1));
      base = hist.size();
      for (int i = L - 1; i >= 0; i--) hist.push_back(int'(x_k[i]));
      #1;
      checks++;
      if (!(mcm_ov && mul_ov)) failures++;
      for (int l = 0; l < L; l++) begin
        e = ref_y(base + L - 1 - l);
        checks += 2;
        if (int'(y_mcm[l]) != e) failures++;
        if (int'(y_mul[l]) != e) failures++;
      end
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    done = 1;
  end
endmodule

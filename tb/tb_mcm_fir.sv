// tb_mcm_fir: self-checking test of the MCM-based block FIR filter.
// Streams random 8-bit samples in blocks of L = 4 with random valid gaps
// and random modified-adder bypass settings, and checks every output lane
// against a direct convolution y(n) = sum_i h(i) x(n-i) computed here from
// the accepted samples (x(n) = 0 before the first sample). Checks that
// out_valid follows in_valid, that an impulse returns the coefficients in
// order, and that full-scale inputs give the exact extreme sums.
module tb_mcm_fir;
  localparam int unsigned L = 4, N = 16, B = 8, BY = 20, G = 4;
  localparam int unsigned NS = (BY + G - 1) / G;
  localparam int unsigned SW = $clog2(G + 1);
  localparam int unsigned NBLK = 300;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [B-1:0]  x_k [L];
  logic [SW-1:0]        rca_skip [NS];
  logic signed [BY-1:0] y_k [L];
  int xs_hist [$];          // accepted samples, oldest first
  int checks = 0, failures = 0;

  mcm_fir dut (.clk, .rst_n, .in_valid, .x_k, .rca_skip, .out_valid, .y_k);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference output for sample index n (x index in xs_hist)
  function automatic int ref_y(int n);
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += int'(fir_pkg::H_DEFAULT[i]) * xs_hist[n-i];
    return acc;
  endfunction

  task automatic send(input int kind);
    int base;
    @(negedge clk);
    in_valid = 1;
    for (int i = L - 1; i >= 0; i--) begin
      case (kind)
        0: x_k[i] = B'($urandom);
        1: x_k[i] = -8'sd128;
        2: x_k[i] = 8'sd127;
        default: x_k[i] = '0;
      endcase
    end
    if (kind == 3 && xs_hist.size() % 64 == 0) x_k[L-1] = 8'sd1;  // impulse
    for (int s = 0; s < NS; s++) rca_skip[s] = SW'($urandom % (G + 1));
    base = xs_hist.size();
    // x_k[L-1] is the oldest sample of the block
    for (int i = L - 1; i >= 0; i--) xs_hist.push_back(int'(x_k[i]));
    #1;
    checks++;
    if (!out_valid) failures++;
    for (int l = 0; l < L; l++) begin
      checks++;
      if (int'(y_k[l]) != ref_y(base + L - 1 - l)) begin
        failures++;
        if (failures < 10) $display("blk %0d lane %0d: got %0d exp %0d", base / L, l, y_k[l], ref_y(base + L - 1 - l));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < L; i++) x_k[i] = '0;
    for (int s = 0; s < NS; s++) rca_skip[s] = SW'(G);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) send(3);          // impulse + zeros
    for (int k = 0; k < 8; k++) send(1);           // full-scale negative
    for (int k = 0; k < 8; k++) send(2);           // full-scale positive
    for (int k = 0; k < NBLK; k++) begin
      send(0);
      if ($urandom % 4 == 0) begin                 // idle cycle: state must hold
        @(negedge clk);
        in_valid = 0;
        for (int i = 0; i < L; i++) x_k[i] = B'($urandom);
        #1;
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

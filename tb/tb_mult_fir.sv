// tb_mult_fir: self-checking test of the multiplier-based block FIR filter.
// Checks that in_ready stays low for the N-cycle coefficient load after
// reset (blocks offered then are refused and change nothing), then streams
// random sample blocks with valid gaps and random adder bypass settings and
// compares every output with a direct convolution computed here. A
// coefficient reload in mid-stream must again hold in_ready low for N
// cycles and leave the filter state intact.
module tb_mult_fir;
  localparam int unsigned L = 4, N = 16, B = 8, BY = 20, G = 4;
  localparam int unsigned NS = (BY + G - 1) / G;
  localparam int unsigned SW = $clog2(G + 1);

  logic clk = 0, rst_n = 0, in_valid = 0, coef_reload = 0, in_ready, out_valid;
  logic signed [B-1:0]  x_k [L];
  logic [SW-1:0]        rca_skip [NS];
  logic signed [BY-1:0] y_k [L];
  int xs_hist [$];
  int checks = 0, failures = 0;
  int wait_cycles;

  mult_fir dut (.clk, .rst_n, .coef_reload, .in_valid, .in_ready, .x_k, .rca_skip,
                .out_valid, .y_k);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int n);
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += int'(fir_pkg::H_DEFAULT[i]) * xs_hist[n-i];
    return acc;
  endfunction

  // offer random blocks until in_ready; count the refused cycles
  task automatic wait_load(output int cycles);
    // called right after a falling clock edge
    cycles = 0;
    forever begin
      in_valid = 1;
      for (int i = 0; i < L; i++) x_k[i] = B'($urandom);
      #1;
      if (in_ready) break;
      checks++;
      if (out_valid) failures++;
      cycles++;
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic send();
    int base;
    @(negedge clk);
    in_valid = 1;
    for (int i = 0; i < L; i++) x_k[i] = B'($urandom);
    for (int s = 0; s < NS; s++) rca_skip[s] = SW'($urandom % (G + 1));
    base = xs_hist.size();
    for (int i = L - 1; i >= 0; i--) xs_hist.push_back(int'(x_k[i]));
    #1;
    checks++;
    if (!(in_ready && out_valid)) failures++;
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
    wait_load(wait_cycles);
    checks++;
    if (wait_cycles != N) begin
      failures++;
      $display("load after reset took %0d cycles, expected %0d", wait_cycles, N);
    end
    for (int k = 0; k < 200; k++) begin
      send();
      if (k == 100) begin
        @(negedge clk);
        in_valid = 0;
        coef_reload = 1;
        @(negedge clk);
        coef_reload = 0;
        wait_load(wait_cycles);
        checks++;
        if (wait_cycles != N) begin
          failures++;
          $display("reload took %0d cycles, expected %0d", wait_cycles, N);
        end
      end else if ($urandom % 4 == 0) begin
        @(negedge clk);
        in_valid = 0;
        #1;
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

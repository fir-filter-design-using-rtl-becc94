// tb_fir_top: end-to-end test of the top level at its default parameters
// (L = 4, N = 16, 8-bit samples and coefficients, 20-bit outputs).
//
// Both filters receive the same sample stream; every output of each is
// compared with a direct convolution computed here. The run makes each
// mechanism of the design happen and counts it:
//   idle        cycles without a valid block (state must hold)
//   refused     blocks offered to the multiplier filter while it loads its
//               coefficients (in_ready low, block not taken)
//   reload      coefficient reloads in mid-stream
//   bypass[s]   output blocks computed with modified-adder cells bypassed
//               at position s (s = G: spare idle), in both filters
//   impulse     impulse blocks, whose response is the coefficient list
//   fullscale   full-scale blocks (largest positive and negative sums)
// A mechanism that never happened counts as a failure.
module tb_fir_top;
  localparam int unsigned L = fir_pkg::L, N = fir_pkg::N, B = fir_pkg::B;
  localparam int unsigned BY = fir_pkg::BY, G = 4;
  localparam int unsigned NS = (BY + G - 1) / G;
  localparam int unsigned SW = $clog2(G + 1);
  localparam int unsigned NBLK = 2000;

  logic clk = 0, rst_n = 0;
  logic mcm_in_valid = 0, mcm_out_valid;
  logic signed [B-1:0]  mcm_x_k [L];
  logic [SW-1:0]        mcm_rca_skip [NS];
  logic signed [BY-1:0] mcm_y_k [L];
  logic mul_coef_reload = 0, mul_in_valid = 0, mul_in_ready, mul_out_valid;
  logic signed [B-1:0]  mul_x_k [L];
  logic [SW-1:0]        mul_rca_skip [NS];
  logic signed [BY-1:0] mul_y_k [L];

  int hist [$];
  int checks = 0, failures = 0;
  int n_idle = 0, n_refused = 0, n_reload = 0, n_impulse = 0, n_fullscale = 0;
  int n_bypass [G+1];

  fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NBLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int n);
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += int'(fir_pkg::H_DEFAULT[i]) * hist[n-i];
    return acc;
  endfunction

  // hold both filters idle while the multiplier filter loads its coefficients,
  // offering it blocks that it must refuse
  task automatic wait_load();
    forever begin
      mcm_in_valid = 0;
      mul_in_valid = 1;
      for (int i = 0; i < L; i++) mul_x_k[i] = B'($urandom);
      #1;
      if (mul_in_ready) break;
      n_refused++;
      checks++;
      if (mul_out_valid || mcm_out_valid) failures++;
      @(negedge clk);
    end
    mul_in_valid = 0;
  endtask

  task automatic send(input int kind);
    int base, e;
    @(negedge clk);
    for (int i = 0; i < L; i++) begin
      case (kind)
        1: mcm_x_k[i] = (i % 2) ? 8'sd127 : -8'sd128;
        2: mcm_x_k[i] = '0;
        default: mcm_x_k[i] = B'($urandom);
      endcase
    end
    if (kind == 2) begin
      mcm_x_k[L-1] = 8'sd1;
      n_impulse++;
    end
    if (kind == 1) n_fullscale++;
    mul_x_k = mcm_x_k;
    for (int s = 0; s < NS; s++) begin
      mcm_rca_skip[s] = SW'($urandom % (G + 1));
      mul_rca_skip[s] = SW'($urandom % (G + 1));
      n_bypass[mcm_rca_skip[s]]++;
    end
    mcm_in_valid = 1;
    mul_in_valid = 1;
    base = hist.size();
    for (int i = L - 1; i >= 0; i--) hist.push_back(int'(mcm_x_k[i]));
    #1;
    checks++;
    if (!(mcm_out_valid && mul_out_valid && mul_in_ready)) failures++;
    for (int l = 0; l < L; l++) begin
      e = ref_y(base + L - 1 - l);
      checks += 2;
      if (int'(mcm_y_k[l]) != e) begin
        failures++;
        if (failures < 10) $display("mcm blk %0d lane %0d: got %0d exp %0d", base / L, l, mcm_y_k[l], e);
      end
      if (int'(mul_y_k[l]) != e) begin
        failures++;
        if (failures < 10) $display("mul blk %0d lane %0d: got %0d exp %0d", base / L, l, mul_y_k[l], e);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < L; i++) begin mcm_x_k[i] = '0; mul_x_k[i] = '0; end
    for (int s = 0; s < NS; s++) begin mcm_rca_skip[s] = SW'(G); mul_rca_skip[s] = SW'(G); end
    for (int s = 0; s <= G; s++) n_bypass[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_load();
    send(2);
    for (int k = 0; k < N / L + 1; k++) send(3);   // random after the impulse
    for (int k = 0; k < NBLK; k++) begin
      if (k % 500 == 100) send(2);
      else if (k % 500 == 200) send(1);
      else send(0);
      if (k % 700 == 350) begin
        @(negedge clk);
        mcm_in_valid = 0;
        mul_in_valid = 0;
        mul_coef_reload = 1;
        n_reload++;
        @(negedge clk);
        mul_coef_reload = 0;
        wait_load();
      end else if ($urandom % 5 == 0) begin
        @(negedge clk);
        mcm_in_valid = 0;
        mul_in_valid = 0;
        n_idle++;
        #1;
        checks++;
        if (mcm_out_valid || mul_out_valid) failures++;
      end
    end
    $display("mechanisms: idle=%0d refused=%0d reload=%0d impulse=%0d fullscale=%0d",
             n_idle, n_refused, n_reload, n_impulse, n_fullscale);
    for (int s = 0; s <= G; s++) $display("  bypass position %0d used in %0d slice-blocks", s, n_bypass[s]);
    checks += 5;
    if (n_idle == 0) failures++;
    if (n_refused < N) failures++;
    if (n_reload == 0) failures++;
    if (n_impulse == 0) failures++;
    if (n_fullscale == 0) failures++;
    for (int s = 0; s <= G; s++) begin
      checks++;
      if (n_bypass[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_register_unit: self-checking test of the register unit.
// Feeds random sample blocks with random valid gaps, keeps its own sample
// history and checks that win[j] = x(kL-j) and xs[l][i] = x(kL-l-i) for the
// current block, with zeros before the first block after reset.
module tb_register_unit;
  localparam int unsigned L = 4;
  localparam int unsigned B = 8;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [B-1:0] x_k [L];
  logic signed [B-1:0] win [2*L-1];
  logic signed [B-1:0] xs  [L][L];
  logic signed [B-1:0] prev [L];     // last accepted block
  int checks = 0, failures = 0;

  register_unit #(.L(L), .B(B)) dut (.clk, .rst_n, .in_valid, .x_k, .win, .xs);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [B-1:0] smp(int j);  // x(kL-j)
    return (j < L) ? x_k[j] : prev[j-L];
  endfunction

  initial begin
    for (int i = 0; i < L; i++) begin x_k[i] = '0; prev[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int i = 0; i < L; i++) x_k[i] = B'($urandom);
      #1;
      for (int j = 0; j < 2 * L - 1; j++) begin
        checks++;
        if (win[j] !== smp(j)) begin
          failures++;
          if (failures < 10) $display("n=%0d win[%0d]=%0d exp %0d", n, j, win[j], smp(j));
        end
      end
      for (int l = 0; l < L; l++)
        for (int i = 0; i < L; i++) begin
          checks++;
          if (xs[l][i] !== smp(l + i)) failures++;
        end
      @(posedge clk);
      if (in_valid) for (int i = 0; i < L; i++) prev[i] = x_k[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

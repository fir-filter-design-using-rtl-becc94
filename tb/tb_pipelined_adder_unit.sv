// tb_pipelined_adder_unit: self-checking test of the pipelined adder unit.
// Drives random inner products with random valid gaps and random adder
// bypass settings. The reference keeps the inner products of the last
// M-1 accepted blocks and checks y[l] = sum_m r_{k-m}^m[l] every cycle.
module tb_pipelined_adder_unit;
  localparam int unsigned L = 4, M = 4, BY = 20, G = 4;
  localparam int unsigned NS = (BY + G - 1) / G;
  localparam int unsigned SW = $clog2(G + 1);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [BY-1:0] r [M][L];
  logic [SW-1:0]        rca_skip [NS];
  logic signed [BY-1:0] y [L];
  int hist [M][M][L];          // hist[a][m][l]: r^m of block k-a (a = 1..M-1)
  int checks = 0, failures = 0;
  int e;

  pipelined_adder_unit #(.L(L), .M(M), .BY(BY), .G(G)) dut (
    .clk, .rst_n, .in_valid, .r, .rca_skip, .y
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < M; a++) for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) hist[a][m][l] = 0;
    for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) r[m][l] = '0;
    for (int s = 0; s < NS; s++) rca_skip[s] = SW'(G);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) r[m][l] = BY'(($urandom % 200001) - 100000);
      for (int s = 0; s < NS; s++) rca_skip[s] = SW'($urandom % (G + 1));
      #1;
      for (int l = 0; l < L; l++) begin
        e = int'(r[0][l]);
        for (int m = 1; m < M; m++) e += hist[m][m][l];
        checks++;
        if (int'(y[l]) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d y[%0d]=%0d exp %0d", n, l, y[l], e);
        end
      end
      @(posedge clk);
      if (in_valid) begin
        for (int a = M - 1; a >= 2; a--)
          for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) hist[a][m][l] = hist[a-1][m][l];
        for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) hist[1][m][l] = int'(r[m][l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_sizes: runs both filter forms at block sizes and lengths other
// than the default (L = 2, N = 8 and L = 8, N = 32) with random coefficient
// sets, comparing every output with a direct convolution.
module tb_fir_sizes;
  localparam logic signed [7:0] H8 [8] = '{
    8'sd3, -8'sd7, 8'sd12, 8'sd127, -8'sd128, 8'sd12, -8'sd7, 8'sd3};
  localparam logic signed [7:0] H32 [32] = '{
    -8'sd2, 8'sd5, 8'sd0, -8'sd9, 8'sd14, 8'sd1, -8'sd20, 8'sd33,
    8'sd6, -8'sd45, 8'sd64, 8'sd17, -8'sd90, 8'sd100, 8'sd121, -8'sd3,
    -8'sd3, 8'sd121, 8'sd100, -8'sd90, 8'sd17, 8'sd64, -8'sd45, 8'sd6,
    8'sd33, -8'sd20, 8'sd1, 8'sd14, -8'sd9, 8'sd0, 8'sd5, -8'sd2};

  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1;
  logic d0, d1;

  fir_size_check #(.L(2), .N(8),  .H(H8))  u_small (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  fir_size_check #(.L(8), .N(32), .H(H32)) u_large (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d0 && d1);
    $display("L=2 N=8: checks=%0d failures=%0d; L=8 N=32: checks=%0d failures=%0d", c0, f0, c1, f1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule

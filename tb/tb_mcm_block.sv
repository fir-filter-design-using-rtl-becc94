// tb_mcm_block: self-checking test of the MCM block.
// Instantiates the widest block (J = 3, 16 constants) and an edge block
// (J = 5, 8 constants) with the default coefficients and checks every
// product against h(mL+i) * x for all 256 input values.
module tb_mcm_block;
  localparam int unsigned L = 4, N = 16, B = 8, BH = 8, M = 4;

  logic signed [B-1:0]    x;
  logic signed [B+BH-1:0] p3 [M][4];
  logic signed [B+BH-1:0] p5 [M][2];
  int checks = 0, failures = 0;

  mcm_block #(.J(3)) dut3 (.x, .prod(p3));
  mcm_block #(.J(5)) dut5 (.x, .prod(p5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = B'(v);
      #1;
      for (int m = 0; m < M; m++) begin
        for (int t = 0; t < 4; t++) begin
          checks++;
          if (int'(p3[m][t]) != v * int'(fir_pkg::H_DEFAULT[m*L + t])) begin
            failures++;
            if (failures < 10) $display("J=3 x=%0d m=%0d t=%0d got %0d", v, m, t, p3[m][t]);
          end
        end
        for (int t = 0; t < 2; t++) begin
          checks++;
          if (int'(p5[m][t]) != v * int'(fir_pkg::H_DEFAULT[m*L + 2 + t])) begin
            failures++;
            if (failures < 10) $display("J=5 x=%0d m=%0d t=%0d got %0d", v, m, t, p5[m][t]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

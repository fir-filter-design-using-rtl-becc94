// tb_adder_network: self-checking test of the adder network.
// Random 16-bit signed products in, checks r[m][l] = sum_i p[m][l][i].
module tb_adder_network;
  localparam int unsigned L = 4, M = 4, BP = 16, BY = 20;

  logic signed [BP-1:0] p [M][L][L];
  logic signed [BY-1:0] r [M][L];
  int checks = 0, failures = 0;
  int e;

  adder_network #(.L(L), .M(M), .BP(BP), .BY(BY)) dut (.p, .r);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++)
          for (int i = 0; i < L; i++)
            p[m][l][i] = (n < 10) ? ((n % 2) ? -16'sd32768 : 16'sd32767) : BP'($urandom);
      #1;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          e = 0;
          for (int i = 0; i < L; i++) e += int'(p[m][l][i]);
          checks++;
          if (int'(r[m][l]) != e) begin
            failures++;
            if (failures < 10) $display("r[%0d][%0d]=%0d exp %0d", m, l, r[m][l], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_inner_product_unit: self-checking test of one inner product unit.
// Random coefficient vector and sample vectors; checks every lane
// r[l] = sum_i c[i] * xs[l][i].
module tb_inner_product_unit;
  localparam int unsigned L = 4, B = 8, BH = 8, BY = 20;

  logic signed [BH-1:0] c  [L];
  logic signed [B-1:0]  xs [L][L];
  logic signed [BY-1:0] r  [L];
  int checks = 0, failures = 0;
  int e;

  inner_product_unit #(.L(L), .B(B), .BH(BH), .BY(BY)) dut (.c, .xs, .r);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < L; i++) c[i] = BH'($urandom);
      for (int l = 0; l < L; l++) for (int i = 0; i < L; i++) xs[l][i] = B'($urandom);
      #1;
      for (int l = 0; l < L; l++) begin
        e = 0;
        for (int i = 0; i < L; i++) e += int'(c[i]) * int'(xs[l][i]);
        checks++;
        if (int'(r[l]) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d r[%0d]=%0d exp %0d", n, l, r[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

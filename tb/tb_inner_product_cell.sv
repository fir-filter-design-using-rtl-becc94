// tb_inner_product_cell: self-checking test of one inner product cell.
// Random signed coefficients and samples (plus the extreme values), checks
// r = sum_i c[i] * x[i].
module tb_inner_product_cell;
  localparam int unsigned L = 4, B = 8, BH = 8, BY = 20;

  logic signed [BH-1:0] c [L];
  logic signed [B-1:0]  x [L];
  logic signed [BY-1:0] r;
  int checks = 0, failures = 0;
  int e;

  inner_product_cell #(.L(L), .B(B), .BH(BH), .BY(BY)) dut (.c, .x, .r);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < L; i++) begin
        c[i] = (n == 0) ? -8'sd128 : BH'($urandom);
        x[i] = (n == 0) ? -8'sd128 : B'($urandom);
      end
      #1;
      e = 0;
      for (int i = 0; i < L; i++) e += int'(c[i]) * int'(x[i]);
      checks++;
      if (int'(r) != e) begin
        failures++;
        if (failures < 10) $display("n=%0d r=%0d exp %0d", n, r, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

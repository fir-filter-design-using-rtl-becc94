// tb_coeff_storage_unit: self-checking test of the coefficient ROM and
// counter. After reset it expects N consecutive write cycles carrying
// h(0) .. h(N-1) at addresses 0 .. N-1, the first in the cycle reset is
// released,, then done high with no more writes;
// then restarts the read-out with start and checks the sequence again.
module tb_coeff_storage_unit;
  localparam int unsigned N = 16, BH = 8, AW = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic wr_en, done;
  logic [AW-1:0] wr_addr;
  logic signed [BH-1:0] wr_data;
  int checks = 0, failures = 0;

  coeff_storage_unit dut (.clk, .rst_n, .start, .wr_en, .wr_addr, .wr_data, .done);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_readout();
    for (int a = 0; a < N; a++) begin
      #1;
      checks++;
      if (!(wr_en && !done && wr_addr == AW'(a) && wr_data == fir_pkg::H_DEFAULT[a])) begin
        failures++;
        $display("cycle %0d: en=%0b done=%0b addr=%0d data=%0d", a, wr_en, done, wr_addr, wr_data);
      end
      @(negedge clk);
    end
    for (int n = 0; n < 5; n++) begin
      #1;
      checks++;
      if (wr_en || !done) begin
        failures++;
        $display("after read-out: en=%0b done=%0b", wr_en, done);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_readout();
    start = 1;
    @(negedge clk);
    start = 0;
    check_readout();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mrca_adder: self-checking test of the modified ripple carry adder.
// Drives random operands, carry-in and per-slice bypass settings (every
// skip value 0..G in every slice, plus out-of-range codes) into a 20-bit
// adder and compares sum and carry-out with the integer sum a + b + cin.
// Also checks a plain 4-bit slice exhaustively over all operands and skips.
module tb_mrca_adder;
  localparam int unsigned W  = 20;
  localparam int unsigned G  = 4;
  localparam int unsigned NS = (W + G - 1) / G;
  localparam int unsigned SW = $clog2(G + 1);

  logic [W-1:0]  a, b, sum;
  logic          cin, cout;
  logic [SW-1:0] skip [NS];
  logic [G-1:0]  sa, sb, ssum;
  logic          scin, scout;
  logic [SW-1:0] sskip;
  int checks = 0, failures = 0;
  logic [W:0] expv;

  mrca_adder #(.W(W), .G(G)) dut (.a, .b, .cin, .skip, .sum, .cout);
  mrca_slice #(.G(G)) dut_s (.a(sa), .b(sb), .cin(scin), .skip(sskip), .sum(ssum), .cout(scout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive single slice
    for (int s = 0; s < 8; s++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++)
          for (int c = 0; c < 2; c++) begin
            sa = G'(x); sb = G'(y); scin = c[0]; sskip = SW'(s);
            #1;
            checks++;
            if ({scout, ssum} != 5'(x + y + c)) begin
              failures++;
              if (failures < 10) $display("slice skip=%0d %0d+%0d+%0d got %0d", s, x, y, c, {scout, ssum});
            end
          end
    // random full adder
    for (int n = 0; n < 4000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      for (int s = 0; s < NS; s++) skip[s] = SW'((n + s * 3) % (G + 1));
      if (n % 7 == 0) skip[n % NS] = SW'(G + 1 + (n % 3));
      #1;
      expv = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({cout, sum} != expv) begin
        failures++;
        if (failures < 10) $display("add %h+%h+%0d got %h exp %h", a, b, cin, {cout, sum}, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// coeff_storage_unit: coefficient ROM with its address counter.
//
// The fixed coefficients h(0) .. h(N-1) sit in an N-entry ROM (built from
// the parameter H). After reset a counter steps the ROM address from 0 to
// N-1, one word per cycle, and presents each word on wr_data with wr_addr
// and wr_en high, so that the filter can copy it into its coefficient
// registers. When the last word has been sent, done rises and stays high
// until the next reset. start = 1 restarts the read-out from address 0.
// Timing: word a is presented in the a-th cycle after reset is released
// (cycle 0 being the first), or after the cycle in which start was high; the
// counter is a registered address and the ROM is read combinationally, so a
// full load takes N cycles. The ROM plus
// counter follows the design; the load protocol is this design's choice.
module coeff_storage_unit #(
  parameter int unsigned N  = fir_pkg::N,
  parameter int unsigned BH = fir_pkg::BH,
  parameter logic signed [BH-1:0] H [N] = fir_pkg::H_DEFAULT,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 wr_en,
  output logic [AW-1:0]        wr_addr,
  output logic signed [BH-1:0] wr_data,
  output logic                 done
);
  logic signed [BH-1:0] rom [N];
  logic [AW-1:0]        cnt_q;
  logic                 run_q;

  always_comb begin
    for (int a = 0; a < N; a++) rom[a] = H[a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      run_q <= 1'b1;
    end else if (start) begin
      cnt_q <= '0;
      run_q <= 1'b1;
    end else if (run_q) begin
      if (cnt_q == AW'(N - 1)) run_q <= 1'b0;
      else                     cnt_q <= cnt_q + 1'b1;
    end
  end

  assign wr_en   = run_q && !start;
  assign wr_addr = cnt_q;
  assign wr_data = rom[cnt_q];
  assign done    = !run_q;
endmodule

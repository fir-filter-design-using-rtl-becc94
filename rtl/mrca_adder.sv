// mrca_adder: W-bit modified ripple carry adder.
//
// The adder is a chain of G-bit mrca_slice instances (the slice drawing
// shows G = 4), each with one spare full-adder cell and the multiplexers
// that let one cell of the slice be taken out of the carry chain. The carry
// ripples from slice to slice. skip[s] names the cell bypassed in slice s;
// the value G in every entry gives a plain ripple carry adder. The result
// is sum = a + b + cin (mod 2^W) for every skip setting.
// Purely combinational; W need not be a multiple of G (the top slice is
// padded with zeros and its extra sum bits are dropped).
module mrca_adder #(
  parameter int unsigned W  = 20,
  parameter int unsigned G  = 4,
  parameter int unsigned NS = (W + G - 1) / G,
  parameter int unsigned SW = $clog2(G + 1)
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          cin,
  input  logic [SW-1:0] skip [NS],
  output logic [W-1:0]  sum,
  output logic          cout
);
  localparam int unsigned WP = NS * G;

  logic [WP-1:0] a_p, b_p, s_p;
  logic [NS:0]   c;

  assign a_p  = WP'(a);
  assign b_p  = WP'(b);
  assign c[0] = cin;

  for (genvar s = 0; s < NS; s++) begin : g_slice
    mrca_slice #(.G(G), .SW(SW)) u_slice (
      .a   (a_p[s*G +: G]),
      .b   (b_p[s*G +: G]),
      .cin (c[s]),
      .skip(skip[s]),
      .sum (s_p[s*G +: G]),
      .cout(c[s+1])
    );
  end

  assign sum  = s_p[W-1:0];
  assign cout = (WP == W) ? c[NS] : s_p[W];
endmodule

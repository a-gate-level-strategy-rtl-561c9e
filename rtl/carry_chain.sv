// M-bit carry chain: M full adders in ripple connection.
//
// Bit k adds x[k], y[k] and the carry out of bit k-1; bit 0 takes cin. The
// carry out of bit M-1 is the chain's cout. In the carry select adder this
// chain is the first block on its own (fed by the adder carry input), and two
// copies of it, with carry inputs tied to 0 and 1, form each later block.
// The worst-case delay of the chain is M carry delays of the full adder.
//
// Interface: x, y (M bits), cin in; s (M bits), cout out.
// Timing: purely combinational.
module carry_chain #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);

  // c[k] is the carry into bit k; c[M] is the chain carry output.
  logic [M:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < M; k++) begin : g_bit
    full_adder u_fa (
      .a  (x[k]),
      .b  (y[k]),
      .ci (c[k]),
      .s  (s[k]),
      .co (c[k+1])
    );
  end

  assign cout = c[M];

endmodule

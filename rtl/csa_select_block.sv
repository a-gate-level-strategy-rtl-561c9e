// One carry-select block of the carry select adder (every block but the
// first).
//
// Two M-bit carry chains add the same operand bits, one assuming a block
// carry input of 0 and the other assuming 1, so both results are ready after
// M full-adder carry delays without waiting for the previous block. When the
// previous block's carry output (sel) arrives, M sum multiplexers pick the
// sum bits of the matching chain, and the carry multiplexer MUX_i picks the
// matching chain carry as this block's carry output. sel therefore drives
// M + 1 multiplexer select inputs, the fan-out that sets the MUX delay in
// the delay model the block sizes are chosen with.
//
// Interface: x, y (M bits), sel = carry out of the previous block in;
// s (M bits), cout = carry out of this block out.
// Timing: purely combinational.
module csa_select_block #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic         sel,
  output logic [M-1:0] s,
  output logic         cout
);

  logic [M-1:0] s0, s1;   // chain sums for carry input 0 and 1
  logic         c0, c1;   // chain carry outputs for carry input 0 and 1

  carry_chain #(.M(M)) u_chain0 (
    .x    (x),
    .y    (y),
    .cin  (1'b0),
    .s    (s0),
    .cout (c0)
  );

  carry_chain #(.M(M)) u_chain1 (
    .x    (x),
    .y    (y),
    .cin  (1'b1),
    .s    (s1),
    .cout (c1)
  );

  // Sum multiplexers.
  mux2 #(.W(M)) u_sum_mux (
    .in0 (s0),
    .in1 (s1),
    .sel (sel),
    .y   (s)
  );

  // Carry multiplexer MUX_i.
  mux2 #(.W(1)) u_carry_mux (
    .in0 (c0),
    .in1 (c1),
    .sel (sel),
    .y   (cout)
  );

endmodule

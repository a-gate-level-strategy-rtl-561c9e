// Carry select adder with freely chosen block sizes.
//
// The N operand bits are split into Q blocks of SIZES[0] .. SIZES[Q-1] bits,
// least significant first, with N the sum of the sizes. The first block is a
// plain ripple carry chain fed by the adder carry input cin. Every later
// block is a carry-select block: it adds its bits twice in parallel, for a
// block carry input of 0 and of 1, and selects the right sum and carry with
// multiplexers driven by the carry output of the block below. The carry
// thus crosses one multiplexer per block instead of M_i full adders, and
// the delay depends on how the N bits are shared among the blocks.
//
// The default sizes, 2, 2, 3, 5, 8, 12, give a 32-bit adder. They come from
// a delay-driven sizing: the first two blocks are equal, each later block is
// made as large as it can be while its chains still finish no later than its
// select signal arrives, where the multiplexer delay grows with its fan-out
// (M_i + 1 select inputs), and leftover bits go where they add least delay.
// Any other sizing is set by overriding Q and SIZES; the sizing procedure
// itself is not part of the hardware.
//
// Interface: x, y (N bits), cin in; s (N bits), cout out. x + y + cin =
// {cout, s}.
// Timing: purely combinational.
module carry_select_adder
  import csa_pkg::*;
#(
  parameter int unsigned  Q     = DEFAULT_Q,
  parameter block_sizes_t SIZES = DEFAULT_SIZES,
  localparam int unsigned N     = block_offset(SIZES, Q)
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  // c[i] is the carry output of block i (0-based), Cout,i+1 in the usual
  // 1-based block numbering.
  logic [Q-1:0] c;

  // First block: plain carry chain fed by the adder carry input.
  carry_chain #(.M(SIZES[0])) u_block0 (
    .x    (x[SIZES[0]-1:0]),
    .y    (y[SIZES[0]-1:0]),
    .cin  (cin),
    .s    (s[SIZES[0]-1:0]),
    .cout (c[0])
  );

  // Blocks 2 .. Q: carry-select blocks selected by the previous carry.
  for (genvar i = 1; i < Q; i++) begin : g_block
    localparam int unsigned LSB = block_offset(SIZES, i);
    localparam int unsigned MI  = SIZES[i];

    csa_select_block #(.M(MI)) u_block (
      .x    (x[LSB +: MI]),
      .y    (y[LSB +: MI]),
      .sel  (c[i-1]),
      .s    (s[LSB +: MI]),
      .cout (c[i])
    );
  end

  assign cout = c[Q-1];

  // The sizing must be usable: at least one block, no more than the list
  // holds, and no empty block among the first Q.
  initial begin
    assert (Q >= 1 && Q <= MAX_BLOCKS)
      else $error("carry_select_adder: Q=%0d out of range 1..%0d", Q, MAX_BLOCKS);
    for (int k = 0; k < Q; k++) begin
      assert (SIZES[k] >= 1)
        else $error("carry_select_adder: block %0d has size 0", k);
    end
  end

endmodule

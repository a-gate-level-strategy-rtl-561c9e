// End-to-end testbench for carry_select_adder at its default sizing
// (32 bits in blocks of 2, 2, 3, 5, 8, 12).
//
// Operands come from corner cases (zero, all ones, a carry generated at the
// bottom that must ripple through every block, a carry generated just below
// each block boundary) and from random values, with both carry-input values.
// {cout, s} is compared with the integer sum x + y + cin.
//
// The carry that enters each block is recomputed from the reference sum
// (carry into bit k = x[k] ^ y[k] ^ sum[k]), so the testbench counts how often
// each select block was selected with a carry of 0 and of 1, how often a
// carry crossed every block boundary at once, and how often the adder carried
// out. Any of these mechanisms that never happened counts as a failure.
module tb_carry_select_adder;
  import csa_pkg::*;

  localparam int unsigned Q = DEFAULT_Q;
  localparam int unsigned N = block_offset(DEFAULT_SIZES, DEFAULT_Q);
  localparam int unsigned NRANDOM = 20000;

  logic [N-1:0] x, y, s;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;

  int unsigned  sel0_count [Q];   // block i selected with carry 0
  int unsigned  sel1_count [Q];   // block i selected with carry 1
  int unsigned  full_ripple_count = 0;
  int unsigned  cout_count = 0;

  carry_select_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xv, input logic [N-1:0] yv, input logic cv);
    logic [N:0] expected;
    logic [N:0] carry_in_bits;   // carry into bit k; bit N is the carry out
    bit         all_carry;
    x   = xv;
    y   = yv;
    cin = cv;
    expected = {1'b0, xv} + {1'b0, yv} + {{N{1'b0}}, cv};
    carry_in_bits = {expected[N], xv ^ yv ^ expected[N-1:0]};
    #1;
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%h y=%h cin=%0d: got %h expected %h", xv, yv, cv, {cout, s}, expected);
    end
    all_carry = 1'b1;
    for (int unsigned i = 1; i < Q; i++) begin
      if (carry_in_bits[block_offset(DEFAULT_SIZES, i)]) sel1_count[i]++;
      else begin
        sel0_count[i]++;
        all_carry = 1'b0;
      end
    end
    if (all_carry && carry_in_bits[N]) full_ripple_count++;
    if (expected[N]) cout_count++;
  endtask

  initial begin
    for (int unsigned i = 0; i < Q; i++) begin
      sel0_count[i] = 0;
      sel1_count[i] = 0;
    end

    // Corner cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);                 // carry from cin through all blocks
    apply('0, '1, 1'b1);
    apply({N{1'b1}}, N'(1), 1'b0);       // carry generated in bit 0
    for (int unsigned i = 1; i < Q; i++) begin
      // A carry generated in the top bit of block i-1 only.
      logic [N-1:0] bit_below;
      bit_below = N'(1) << (block_offset(DEFAULT_SIZES, i) - 1);
      apply(bit_below, bit_below, 1'b0);
      apply(bit_below, bit_below, 1'b1);
    end

    // Random operands.
    for (int unsigned n = 0; n < NRANDOM; n++) begin
      logic [N-1:0] xr, yr;
      xr = N'({$urandom, $urandom});
      yr = N'({$urandom, $urandom});
      // Every fourth vector makes y close to the complement of x, so that
      // long propagate runs are frequent.
      if (n % 4 == 3) yr = ~xr ^ (N'(1) << ($urandom % N));
      apply(xr, yr, 1'($urandom));
    end

    for (int unsigned i = 1; i < Q; i++) begin
      $display("block %0d (M=%0d): selected with carry 0: %0d, with carry 1: %0d",
               i + 1, DEFAULT_SIZES[i], sel0_count[i], sel1_count[i]);
      if (sel0_count[i] == 0 || sel1_count[i] == 0) begin
        failures++;
        $display("FAIL block %0d was not selected both ways", i + 1);
      end
    end
    $display("carry through every block boundary: %0d, carry out: %0d",
             full_ripple_count, cout_count);
    if (full_ripple_count == 0) begin
      failures++;
      $display("FAIL no carry crossed every block");
    end
    if (cout_count == 0) begin
      failures++;
      $display("FAIL no carry out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

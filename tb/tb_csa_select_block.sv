// Self-checking testbench for csa_select_block at M = 4: every combination of
// the operands and of the select (the carry of the block below) is applied.
// The expected result is the integer sum x + y + sel, i.e. the block must
// behave like a 4-bit adder whose carry input is the select signal.
module tb_csa_select_block;

  localparam int unsigned M = 4;

  logic [M-1:0] x, y, s;
  logic         sel, cout;
  int           checks = 0;
  int           failures = 0;

  csa_select_block #(.M(M)) dut (.x(x), .y(y), .sel(sel), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * M + 1)); v++) begin
      int unsigned total;
      {sel, x, y} = (2 * M + 1)'(v);
      total = int'(x) + int'(y) + int'(sel);
      #1;
      checks++;
      if ({cout, s} != (M + 1)'(total)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d y=%0d sel=%0d: got %0d", x, y, sel, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

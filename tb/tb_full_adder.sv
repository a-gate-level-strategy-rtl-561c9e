// Self-checking testbench for full_adder: all eight input combinations are
// applied and sum and carry are compared with the arithmetic sum a + b + ci.
module tb_full_adder;

  logic a, b, ci, s, co;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned total;
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({co, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d: got co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for carry_chain at M = 5: every combination of the
// two 5-bit operands and the carry input is applied and {cout, s} is compared
// with the integer sum x + y + cin.
module tb_carry_chain;

  localparam int unsigned M = 5;

  logic [M-1:0] x, y, s;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;

  carry_chain #(.M(M)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

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
      {cin, x, y} = (2 * M + 1)'(v);
      total = int'(x) + int'(y) + int'(cin);
      #1;
      checks++;
      if ({cout, s} != (M + 1)'(total)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d y=%0d cin=%0d: got %0d", x, y, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for mux2 at 8 bits: random data on both inputs
// with both select values; the output must equal the selected input.
module tb_mux2;

  localparam int unsigned W = 8;

  logic [W-1:0] in0, in1, y;
  logic         sel;
  int           checks = 0;
  int           failures = 0;

  mux2 #(.W(W)) dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      in0 = W'($urandom);
      in1 = W'($urandom);
      sel = 1'(n);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0d in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

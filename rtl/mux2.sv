// W-bit two-input multiplexer, used for the sum selection and for the block
// carry selection (MUX_i) of the carry select adder.
//
// When sel is 0 the output follows in0 (the result computed for a block carry
// input of 0), when sel is 1 it follows in1 (the result computed for a block
// carry input of 1). The transmission-gate circuit of the real cell and its
// fan-out dependent delay are not modelled; only its logic function is.
//
// Interface: in0, in1 (W bits), sel in; y (W bits) out.
// Timing: purely combinational.
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] y
);

  always_comb begin
    y = sel ? in1 : in0;
  end

endmodule

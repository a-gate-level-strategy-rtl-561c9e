// One-bit full adder, the cell that every carry chain of the carry select
// adder is built from.
//
// The carry is the majority of the three inputs. The sum is derived from the
// inverted carry in the manner of the mirror full adder: it is 1 when at
// least one input is 1 and the carry is 0, or when all three inputs are 1.
// That factoring is the classic mirror-adder logic equation; the design only
// fixes that the cell is a full adder with one carry delay per bit. The
// transistor sizing and the delay of the cell are not modelled.
//
// Interface: a, b, ci in; s = a ^ b ^ ci, co = maj(a, b, ci) out.
// Timing: purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    co = (a & b) | (ci & (a | b));
    s  = (~co & (a | b | ci)) | (a & b & ci);
  end

endmodule

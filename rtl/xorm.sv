// xorm - modified XOR gate.
//
// Computes y = a XOR b with four simple gates instead of the usual five:
// an AND and an OR of the two inputs, an inverter on the AND, and a final
// AND that passes the OR only when the inputs are not both 1:
//     y = (a | b) & ~(a & b)
// The four-gate AND-OR-NOT structure is the design's; the gates are written
// out as separate nets so that the structure survives in the netlist view.
// Purely combinational, no clock.
module xorm (
  input  logic a,
  input  logic b,
  output logic y
);
  logic and_ab, or_ab, nand_ab;

  always_comb begin
    and_ab  = a & b;
    or_ab   = a | b;
    nand_ab = ~and_ab;
    y       = or_ab & nand_ab;
  end
endmodule

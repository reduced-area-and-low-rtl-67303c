// ham - modified half adder.
//
// A half adder built from the four-gate XOR of xorm.sv: the AND of the two
// inputs, which the XOR needs internally anyway, is also taken out as the
// carry. That saves the separate carry AND of a conventional half adder, so
// the cell costs four gates:
//     carry = a & b
//     sum   = (a | b) & ~carry
// The gate structure follows the design; it is combinational, no clock.
module ham (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic or_ab, not_carry;

  always_comb begin
    carry     = a & b;
    or_ab     = a | b;
    not_carry = ~carry;
    sum       = or_ab & not_carry;
  end
endmodule

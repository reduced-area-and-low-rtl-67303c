// fam - modified full adder.
//
// Two modified half adders in series: the first adds a and b, the second
// adds that partial sum and cin. At most one of the two half-adder carries
// can be 1, so one two-input gate merging them gives the carry out. With four
// gates per half adder the cell has nine gates.
//     {c1, s1}    = ham(a, b)
//     {c2, sum}   = ham(s1, cin)
//     carry       = c1 | c2
// The two-HAM structure follows the design. The merge gate is written as an
// OR, which is the function the cell needs. Combinational, no clock.
module fam (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic s1, c1, c2;

  ham u_ham0 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  ham u_ham1 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign carry = c1 | c2;
endmodule

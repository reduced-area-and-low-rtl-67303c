// rca - ripple carry adder of modified full adders, with a carry in.
//
// Adds two N-bit words and cin: every bit is a fam cell, and the carry
// ripples from bit 0 upward; cout is the carry out of bit N-1. The least
// significant group of the square-root carry select adder is this adder
// (two fam cells for the 16-bit adder). Combinational, no clock; the delay
// grows linearly with N.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  // carry[i] is the carry into bit i
  logic [N:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    fam u_fam (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .carry(carry[i+1]));
  end

  assign cout = carry[N];
endmodule

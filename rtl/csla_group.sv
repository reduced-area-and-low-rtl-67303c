// csla_group - one N-bit group of the square-root carry select adder.
//
// The group adds its slices of a and b once, with a carry in of 0, in an
// N-bit ripple adder whose first cell is a half adder. The clb turns that
// result into the sum for a carry in of 1 (sum + 1) and into the group's
// carry out. When the previous group's carry (cin) arrives, sel_mux picks
// one of the two N-bit sums and the clb's AND/XOR pair finishes cout.
// Only the mux and one AND plus one XOR lie on the carry path, which is what
// makes the groups fast; the group structure follows the design.
// Combinational, no clock.
module csla_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] sum0, sum1;
  logic         c0;

  rca0 #(.N(N)) u_rca (
    .a(a), .b(b), .sum(sum0), .cout(c0)
  );

  clb #(.N(N)) u_clb (
    .s(sum0), .c(c0), .cin(cin), .x(sum1), .cout(cout)
  );

  sel_mux #(.N(N)) u_mux (
    .d0(sum0), .d1(sum1), .sel(cin), .y(sum)
  );
endmodule

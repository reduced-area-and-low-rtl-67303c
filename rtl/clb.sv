// clb - combinational logic block of a carry select group.
//
// Takes the N-bit sum s and carry c that the group's ripple adder produced
// for a carry in of 0 and derives from them what a carry in of 1 would give:
//   * x = s + 1 (mod 2^N): bit 0 is the inverse of s[0]; above it a chain of
//     N-1 modified half adders adds the running carry k into each bit,
//     starting from k[0] = s[0].
//   * cout, the carry out of the whole group. The incrementer overflows only
//     when s is all ones, and s all ones with c = 1 cannot occur
//     (a + b <= 2^(N+1) - 2), so the group's carry is
//         cout = c XOR (k[N-1] AND cin)
//     made with one AND gate and one xorm. Because cin is already folded in,
//     cout needs no place in the group's multiplexer.
// The block is (N+1) bits wide in the design's terms: N sum bits plus the
// carry. Its gate structure (NOT, HAM chain, AND, XORM) follows the design.
// Combinational, no clock.
module clb #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] s,
  input  logic         c,
  input  logic         cin,
  output logic [N-1:0] x,
  output logic         cout
);
  // k[i] = s[i] & ... & s[0], the incrementer carry out of bit i
  logic [N-1:0] k;
  logic         all_ones_and_cin;

  assign x[0] = ~s[0];
  assign k[0] = s[0];

  for (genvar i = 1; i < N; i++) begin : g_inc
    ham u_ham (.a(s[i]), .b(k[i-1]), .sum(x[i]), .carry(k[i]));
  end

  assign all_ones_and_cin = k[N-1] & cin;

  xorm u_xorm (.a(c), .b(all_ones_and_cin), .y(cout));
endmodule

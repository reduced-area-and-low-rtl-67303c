// rca0 - ripple carry adder for a carry in of 0.
//
// Computes {cout, sum} = a + b for two N-bit words. With no carry in, bit 0
// needs only a half adder (ham); bits 1..N-1 are fam cells and the carry
// ripples upward from bit 0. This is the adder that every carry select group
// above the first one uses to precompute its carry-in-0 sum: one ham and
// N-1 fam cells, as the design specifies. Combinational, no clock.
module rca0 #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  // carry[i] is the carry out of bit i
  logic [N-1:0] carry;

  ham u_ham0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .carry(carry[0]));

  for (genvar i = 1; i < N; i++) begin : g_bit
    fam u_fam (.a(a[i]), .b(b[i]), .cin(carry[i-1]), .sum(sum[i]), .carry(carry[i]));
  end

  assign cout = carry[N-1];
endmodule

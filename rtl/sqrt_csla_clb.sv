// sqrt_csla_clb - square-root carry select adder with combinational logic blocks.
//
// Computes {cout, sum} = a + b + cin for WIDTH-bit words, without a clock.
// The word is split into groups of growing size (see csla_pkg): for the
// default WIDTH of 16 they are [1:0], [3:2], [6:4], [10:7] and [15:11].
//   * Group 0 is a 2-bit ripple adder of modified full adders fed by cin.
//   * Every later group (csla_group) adds its bits ahead of time for a carry
//     in of 0, derives the carry-in-1 sum with an incrementer (the clb), and
//     waits only for the carry of the group below to pick one sum through a
//     mux. The group's carry out is made in the clb by one AND and one XOR,
//     not by the mux.
// Larger groups sit higher in the word because their carry arrives later, so
// each group's own ripple delay is hidden behind the carry chain; the delay
// grows roughly with the square root of WIDTH.
// The group sizes for 16 bits, the cells and the carry-out path follow the
// design; the rule used for other widths (the last group takes what is left)
// is this implementation's choice.
module sqrt_csla_clb #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  import csla_pkg::*;

  localparam int unsigned NG = num_groups(WIDTH);

  // c[g] is the carry into group g; c[NG] is the adder's carry out
  logic [NG:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned SZ  = group_size(WIDTH, g);

    if (g == 0) begin : g_first
      rca #(.N(SZ)) u_rca (
        .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .cin(c[g]),
        .sum(sum[LSB +: SZ]), .cout(c[g+1])
      );
    end else begin : g_sel
      csla_group #(.N(SZ)) u_group (
        .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .cin(c[g]),
        .sum(sum[LSB +: SZ]), .cout(c[g+1])
      );
    end
  end

  assign cout = c[NG];

  initial assert (WIDTH >= 1) else $error("sqrt_csla_clb: WIDTH must be at least 1");
endmodule

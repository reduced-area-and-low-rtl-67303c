// sel_mux - 2N:N multiplexer of a carry select group.
//
// Passes d0 (the group's sum for a carry in of 0) when sel is 0 and d1 (the
// sum for a carry in of 1) when sel is 1. sel is the carry coming out of the
// previous group. The design names the mux by its width only (4:2, 6:3, 8:4,
// 10:5); it is written here as a plain 2:1 selection per bit.
// Combinational, no clock.
module sel_mux #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule

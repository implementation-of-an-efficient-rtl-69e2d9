// csla_group: one N-bit group of the BEC-based carry-select adder.
//
// A single N-bit ripple carry adder computes {c, r} = a + b with its carry-in fixed at 0 (a
// half adder and N-1 full adders). The (N+1)-bit word {c, r} then feeds an (N+1)-bit binary to
// excess-1 converter and a 2(N+1):(N+1) mux: the mux passes {c, r} when the group's carry-in is
// 0 and {c, r} + 1 when it is 1. So {cout, s} = a + b + cin, while the second ripple adder
// (carry-in 1) of a conventional carry-select group is replaced by the cheaper converter.
// Combinational; the carry-in only passes through the mux to reach cout and s.
// The structure and its cost for N = 2 (43 gates: FA 13 + HA 6 + converter 12 + mux 12)
// follow the published design.
module csla_group
  import csla_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int unsigned AOI_GATES = group_gates(N);

  logic [N-1:0] r0;
  logic         c0;

  rca #(.N(N), .HAS_CIN(1'b0)) u_rca (
    .a (a),
    .b (b),
    .ci(1'b0),
    .s (r0),
    .co(c0)
  );

  bec_mux #(.N(N + 1)) u_sel (
    .b  ({c0, r0}),
    .cin(cin),
    .s  ({cout, s})
  );
endmodule

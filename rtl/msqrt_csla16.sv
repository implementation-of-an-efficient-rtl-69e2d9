// msqrt_csla16: 16-bit modified square-root carry-select adder.
//
// {cout, sum} = a + b + cin, split into five groups whose widths grow toward the top so that
// each group's local result is ready about when the carry from below arrives:
//   group 1  bits  1:0   2-bit ripple carry adder, fed by cin            -> c1
//   group 2  bits  3:2   2-bit RCA (carry-in 0) + 3-bit BEC + 6:3 mux    -> c3
//   group 3  bits  6:4   3-bit RCA (carry-in 0) + 4-bit BEC + 8:4 mux    -> c6
//   group 4  bits 10:7   4-bit RCA (carry-in 0) + 5-bit BEC + 10:5 mux   -> c10
//   group 5  bits 15:11  5-bit RCA (carry-in 0) + 6-bit BEC + 12:6 mux   -> cout
// In groups 2 to 5 the carry-in-1 ripple adder of the regular square-root carry-select adder
// is replaced by a binary to excess-1 converter (BEC) that adds one to the carry-in-0 result,
// saving gates for a small increase in delay. The carry from group to group passes through one
// mux per group. The whole adder is combinational: no clock, no reset, no latency in cycles.
// Group widths, the BEC substitution and the mux sizes follow the published structure; the
// gate-level form of each cell is the usual AND/OR/inverter one.
module msqrt_csla16
  import csla_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  localparam int unsigned AOI_GATES = rca_gates(2, 1'b1) + group_gates(2) + group_gates(3)
                                    + group_gates(4) + group_gates(5);

  logic c1, c3, c6, c10;

  rca #(.N(2), .HAS_CIN(1'b1)) u_g1 (
    .a(a[1:0]), .b(b[1:0]), .ci(cin), .s(sum[1:0]), .co(c1)
  );

  csla_group #(.N(2)) u_g2 (
    .a(a[3:2]), .b(b[3:2]), .cin(c1), .s(sum[3:2]), .cout(c3)
  );

  csla_group #(.N(3)) u_g3 (
    .a(a[6:4]), .b(b[6:4]), .cin(c3), .s(sum[6:4]), .cout(c6)
  );

  csla_group #(.N(4)) u_g4 (
    .a(a[10:7]), .b(b[10:7]), .cin(c6), .s(sum[10:7]), .cout(c10)
  );

  csla_group #(.N(5)) u_g5 (
    .a(a[15:11]), .b(b[15:11]), .cin(c10), .s(sum[15:11]), .cout(cout)
  );
endmodule

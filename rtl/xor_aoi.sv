// xor_aoi: two-input exclusive OR from AND, OR and inverter gates.
//
// y = (a & ~b) | (~a & b): two inverters, two 2-input ANDs and one 2-input OR, i.e. five gates
// and three gate levels (inverter, AND, OR). This is the sum-of-products XOR used by every
// adder and converter cell in this library. Purely combinational, no timing of its own.
// The AOI form and its cost (5 gates, 3 levels) follow the published design.
module xor_aoi
  import csla_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);
  localparam int unsigned AOI_GATES = AREA_XOR;

  logic a_n, b_n, p0, p1;

  assign a_n = ~a;
  assign b_n = ~b;
  assign p0  = a & b_n;
  assign p1  = a_n & b;
  assign y   = p0 | p1;
endmodule

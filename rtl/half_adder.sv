// half_adder: one-bit half adder.
//
// s = a xor b (an AOI XOR cell), c = a & b (one AND gate): six gates in all. Used as the least
// significant cell of a ripple carry adder whose carry-in is fixed at 0. Combinational.
// Only the 6-gate cost is published; the XOR-plus-AND arrangement is chosen to match it.
module half_adder
  import csla_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  localparam int unsigned AOI_GATES = AREA_HA;

  xor_aoi u_xor (.a(a), .b(b), .y(s));
  assign c = a & b;
endmodule

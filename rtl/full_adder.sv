// full_adder: one-bit full adder.
//
// Two AOI XOR cells form the sum, p = a ^ b and s = p ^ ci. The carry is co = (a & b) | (p & ci):
// two ANDs and one OR. Thirteen AOI gates in all. Combinational; the carry path from ci is
// one AND and one OR deep, which is what makes the ripple chain of an RCA cheap per bit.
// Only the cost of this cell is published (13 gates, 5 levels); this arrangement matches the
// gate count, but its sum path (two XORs in series) is 6 levels deep.
module full_adder
  import csla_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  localparam int unsigned AOI_GATES = AREA_FA;

  logic p, g, t;

  xor_aoi u_xor_p (.a(a), .b(b),  .y(p));
  xor_aoi u_xor_s (.a(p), .b(ci), .y(s));

  assign g  = a & b;
  assign t  = p & ci;
  assign co = g | t;
endmodule

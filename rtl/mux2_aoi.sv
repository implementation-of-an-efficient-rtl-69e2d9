// mux2_aoi: one-bit 2:1 multiplexer from AND, OR and inverter gates.
//
// y = (d0 & ~sel) | (d1 & sel): one inverter, two ANDs and one OR (four gates, three gate
// levels). sel = 0 passes d0, sel = 1 passes d1. Combinational.
// Only the cost of this cell is published (4 gates, 3 levels); this gate arrangement is
// the simplest one with that cost.
module mux2_aoi
  import csla_pkg::*;
(
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  localparam int unsigned AOI_GATES = AREA_MUX2;

  logic sel_n, p0, p1;

  assign sel_n = ~sel;
  assign p0    = d0 & sel_n;
  assign p1    = d1 & sel;
  assign y     = p0 | p1;
endmodule

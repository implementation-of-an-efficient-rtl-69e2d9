// csla_pkg: constants and cost formulas shared by the carry-select adder cells.
//
// Every cell in this library is written with AND, OR and inverter (AOI) gates only. The
// unit-gate cost model counts each such gate as one unit of area (and one unit of delay).
// XOR (5 gates, 3 levels) and 2:1 mux (4 gates, 3 levels) are the base cells; the half adder
// (XOR + AND = 6) and full adder (2 XOR + 2 AND + OR = 13) counts are derived from them, and
// the composite formulas count the cells each module instantiates. Each module states its own
// count in an AOI_GATES localparam built from these. Nothing here generates hardware.
package csla_pkg;

  // Unit-gate area (gate count) of the basic cells.
  localparam int unsigned AREA_XOR  = 5;
  localparam int unsigned AREA_MUX2 = 4;
  localparam int unsigned AREA_HA   = AREA_XOR + 1;
  localparam int unsigned AREA_FA   = 2 * AREA_XOR + 3;

  // N-bit ripple carry adder: N full adders, or one half adder and N-1 full adders when the
  // carry-in is tied to 0.
  function automatic int unsigned rca_gates(int unsigned n, bit has_cin);
    return has_cin ? n * AREA_FA : AREA_HA + (n - 1) * AREA_FA;
  endfunction

  // N-bit binary to excess-1 converter: one inverter, N-1 XORs and N-2 ANDs in the carry chain.
  function automatic int unsigned bec_gates(int unsigned n);
    if (n <= 1) return 1;
    return 1 + (n - 1) * AREA_XOR + (n - 2);
  endfunction

  // 2N:N multiplexer: N 2:1 mux cells.
  function automatic int unsigned mux_gates(int unsigned n);
    return n * AREA_MUX2;
  endfunction

  // One BEC-based carry-select group of N bits: RCA (carry-in 0), (N+1)-bit BEC,
  // 2(N+1):(N+1) mux.
  function automatic int unsigned group_gates(int unsigned n);
    return rca_gates(n, 1'b0) + bec_gates(n + 1) + mux_gates(n + 1);
  endfunction

endpackage

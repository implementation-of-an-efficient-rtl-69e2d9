// mux_2n_n: 2N:N word multiplexer.
//
// N one-bit AOI 2:1 mux cells sharing one select line: y = sel ? d1 : d0. In the carry-select
// adder this is the 6:3, 8:4, 10:5 or 12:6 mux that picks a group's carry-in-0 or carry-in-1
// result. Combinational; delay is one mux cell regardless of N.
// The published design names these muxes by size only; building them from shared-select 2:1
// cells reproduces its gate count (3 x 4 = 12 gates for the 6:3 mux).
module mux_2n_n
  import csla_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  localparam int unsigned AOI_GATES = mux_gates(N);

  generate
    for (genvar i = 0; i < N; i++) begin : g_bit
      mux2_aoi u_mux (.d0(d0[i]), .d1(d1[i]), .sel(sel), .y(y[i]));
    end
  endgenerate
endmodule

// bec_mux: conditional increment by an excess-1 converter and a 2N:N mux.
//
// The N-bit word b goes both straight to the mux's 0 input and through an N-bit binary to
// excess-1 converter to its 1 input; cin selects. The output is therefore s = b + cin
// (mod 2^N). Both candidates exist before cin arrives, so cin only sees one mux delay.
// Combinational.
// This pairing of converter and mux, and which mux input gets which word, follow the
// published design.
module bec_mux
  import csla_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s
);
  localparam int unsigned AOI_GATES = bec_gates(N) + mux_gates(N);

  logic [N-1:0] b_inc;

  bec      #(.N(N)) u_bec (.b(b), .x(b_inc));
  mux_2n_n #(.N(N)) u_mux (.d0(b), .d1(b_inc), .sel(cin), .y(s));
endmodule

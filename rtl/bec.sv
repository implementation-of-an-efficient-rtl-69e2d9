// bec: N-bit binary to excess-1 converter.
//
// Produces x = b + 1 modulo 2^N without a full adder chain. Bit 0 is inverted; every higher bit
// i is b[i] XOR (b[0] & ... & b[i-1]), the AND prefix being built as a chain of two-input ANDs
// (t[i] = t[i-1] & b[i-1]). For N = 4: x0 = ~b0, x1 = b1 ^ b0, x2 = b2 ^ (b0 & b1),
// x3 = b3 ^ (b0 & b1 & b2); 1111 wraps to 0000. Cost: one inverter, N-1 AOI XORs and N-2 ANDs.
// In a carry-select group the top bit of b is the ripple adder's carry-out, so the wrap-around
// case cannot arise there (the carry-out and all sum bits are never 1 together).
// Combinational.
// The equations follow the published 4-bit converter; the N-bit form is their direct
// generalisation.
module bec
  import csla_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  localparam int unsigned AOI_GATES = bec_gates(N);

  // t[i] = AND of b[i-1:0]; t[0] is unused.
  logic [N-1:0] t;

  assign x[0] = ~b[0];
  assign t[0] = 1'b1;

  generate
    if (N > 1) begin : g_hi
      assign t[1] = b[0];
      for (genvar i = 2; i < N; i++) begin : g_and
        assign t[i] = t[i-1] & b[i-1];
      end
      for (genvar i = 1; i < N; i++) begin : g_xor
        xor_aoi u_xor (.a(b[i]), .b(t[i]), .y(x[i]));
      end
    end
  endgenerate
endmodule

// rca: N-bit ripple carry adder.
//
// A chain of one-bit adder cells, each taking the carry-out of the cell below as its carry-in;
// {co, s} = a + b + ci. With HAS_CIN = 1 all N cells are full adders and ci is used. With
// HAS_CIN = 0 the carry-in is fixed at 0, so the lowest cell is a half adder and ci is not
// read; this is the form used inside a carry-select group, where the carry-in-0 result is
// computed once and the carry-in-1 result is derived from it by an excess-1 converter.
// Combinational; delay grows linearly with N.
// The cascaded full-adder form and the half-adder lowest cell for carry-in 0 follow the
// published group structure; the HAS_CIN switch is this implementation's way to cover both.
module rca
  import csla_pkg::*;
#(
  parameter int unsigned N       = 2,
  parameter bit          HAS_CIN = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);
  localparam int unsigned AOI_GATES = rca_gates(N, HAS_CIN);

  logic [N:0] c;

  generate
    if (HAS_CIN) begin : g_cin
      assign c[0] = ci;
      full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(s[0]), .co(c[1]));
    end else begin : g_nocin
      // ci is not part of the circuit in this form; the carry-in is a constant 0.
      logic unused_ci;
      assign unused_ci = ci;
      assign c[0] = 1'b0;
      half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .c(c[1]));
    end

    for (genvar i = 1; i < N; i++) begin : g_bit
      full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
    end
  endgenerate

  assign co = c[N];
endmodule

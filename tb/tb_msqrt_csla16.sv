// tb_msqrt_csla16: end-to-end check of the 16-bit modified square-root carry-select adder at
// its only (full) size.
//
// Drives directed corner cases (zero, all ones, carry rippling through all 16 bits, carry
// entering each group boundary), random operands with random carry-in, and every pair of
// zero-extended 8-bit operands (an 8-bit add run on this adder), comparing
// {cout, sum} with a + b + cin computed by the simulator. From the operands alone it also
// classifies what each group had to do and counts how often each mechanism of the adder
// occurred, failing if one never did:
//   - each group's mux taking the converter (incremented) path, and the direct path;
//   - each group's carry-out coming from its own ripple adder (generate);
//   - each group's carry-out coming from the converter wrapping an all-ones partial result
//     (carry propagated through the group by the increment).
// Also checks the unit-gate count formulas: 43 gates for group 2 and 336 for the whole adder.
module tb_msqrt_csla16;
  import csla_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0] a, b, sum;
  logic        cin, cout;

  msqrt_csla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // Per-group event counters, index 0..3 for groups 2..5.
  int n_sel1 [4];
  int n_sel0 [4];
  int n_gen  [4];
  int n_prop [4];
  int n_cin1;

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h cin=%b got %0h expected %0h", name, a, b, cin, got, exp);
    end
  endtask

  // Bit boundaries of the five groups: group g covers bits LO[g] .. LO[g+1]-1.
  localparam int LO [6] = '{0, 2, 4, 7, 11, 16};

  // Carry out of bits [hi-1:0] of x + y + c, worked out by the simulator's own addition.
  function automatic logic carry_below(logic [15:0] x, logic [15:0] y, logic c, int hi);
    logic [16:0] t;
    logic [16:0] mask;
    mask = (17'(1) << hi) - 17'(1);
    t = (17'(x) & mask) + (17'(y) & mask) + 17'(c);
    return t[hi];
  endfunction

  // Classifies what each of groups 2..5 did for operands x, y, c, from the operands alone:
  // the group's carry-in selects the incremented (1) or direct (0) path; the group generates
  // a carry when its slice sum without carry-in overflows; the carry passes through the
  // converter when the carry-in is 1 and the slice sum is all ones without overflowing.
  task automatic observe(logic [15:0] x, logic [15:0] y, logic c);
    for (int g = 1; g < 5; g++) begin
      logic        gcin;
      logic [16:0] part;
      int          w;
      w    = LO[g+1] - LO[g];
      gcin = carry_below(x, y, c, LO[g]);
      part = ((17'(x) >> LO[g]) & ((17'(1) << w) - 17'(1)))
           + ((17'(y) >> LO[g]) & ((17'(1) << w) - 17'(1)));
      if (gcin) n_sel1[g-1]++; else n_sel0[g-1]++;
      if (part[w]) n_gen[g-1]++;
      if (gcin && part == (17'(1) << w) - 17'(1)) n_prop[g-1]++;
    end
    if (c) n_cin1++;
  endtask

  task automatic apply(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] ref_sum;
    a = x; b = y; cin = c;
    #1;
    ref_sum = 17'(x) + 17'(y) + 17'(c);
    check("sum", longint'({cout, sum}), longint'(ref_sum));
    observe(x, y, c);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_cin1 = 0;
    for (int g = 0; g < 4; g++) begin
      n_sel1[g] = 0; n_sel0[g] = 0; n_gen[g] = 0; n_prop[g] = 0;
    end

    // Directed corners.
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'hFFFF, 16'h0000, 1'b1);   // carry ripples through every group's converter
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);   // only the top group generates cout
    apply(16'h0003, 16'h0001, 1'b0);   // carry into group 2 only
    apply(16'h000C, 16'h0004, 1'b0);   // group 2 generates into group 3
    apply(16'h0070, 16'h0010, 1'b0);   // group 3 generates into group 4
    apply(16'h0780, 16'h0080, 1'b0);   // group 4 generates into group 5
    for (int k = 0; k < 16; k++) apply(16'(1) << k, 16'hFFFF, 1'b0);
    for (int k = 0; k < 16; k++) apply(~(16'(1) << k), 16'h0000, 1'b1);

    // Random operands.
    for (int i = 0; i < 200000; i++) begin
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    end

    // 8-bit word size on the 16-bit adder: every pair of zero-extended 8-bit operands with
    // both carry-in values; the 8-bit result and its carry appear on sum[8:0].
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        apply(16'(x), 16'(y), 1'b0);
        apply(16'(x), 16'(y), 1'b1);
      end
    end

    // Unit-gate count of the adder: group 1 (two full adders, 26) plus groups 2..5
    // (43 + 66 + 89 + 112), i.e. 336 AOI gates.
    check("gates group2", longint'(group_gates(2)), 43);
    check("gates total", longint'(rca_gates(2, 1'b1) + group_gates(2) + group_gates(3)
                                  + group_gates(4) + group_gates(5)), 336);

    for (int g = 0; g < 4; g++) begin
      $display("group%0d: incremented path %0d, direct path %0d, carry generated %0d, carry through converter %0d",
               g + 2, n_sel1[g], n_sel0[g], n_gen[g], n_prop[g]);
      checks++; if (n_sel1[g] == 0) begin failures++; $display("FAIL group%0d never took the incremented path", g + 2); end
      checks++; if (n_sel0[g] == 0) begin failures++; $display("FAIL group%0d never took the direct path", g + 2); end
      checks++; if (n_gen[g]  == 0) begin failures++; $display("FAIL group%0d never generated a carry", g + 2); end
      checks++; if (n_prop[g] == 0) begin failures++; $display("FAIL group%0d never passed a carry through its converter", g + 2); end
    end
    $display("carry-in 1 applied %0d times", n_cin1);
    checks++; if (n_cin1 == 0) begin failures++; $display("FAIL carry-in never 1"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

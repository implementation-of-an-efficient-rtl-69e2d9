// tb_rca: exhaustive check of ripple carry adders at the widths the carry-select adder uses.
// Instances: 2-bit with carry-in (group 1) and 2..5-bit with carry-in fixed at 0 (groups 2-5).
// For the carry-in-0 forms ci is driven with random values to show that it is ignored.
// Gate counts are checked: 2 full adders = 26, and 1 half adder + (N-1) full adders.
module tb_rca;
  int checks = 0, failures = 0;

  logic [1:0] a2c, b2c, s2c;
  logic       ci2c, co2c;
  rca #(.N(2), .HAS_CIN(1'b1)) dut (.a(a2c), .b(b2c), .ci(ci2c), .s(s2c), .co(co2c));

  logic [1:0] a2, b2, s2;  logic co2, ci2;
  logic [2:0] a3, b3, s3;  logic co3, ci3;
  logic [3:0] a4, b4, s4;  logic co4, ci4;
  logic [4:0] a5, b5, s5;  logic co5, ci5;
  rca #(.N(2), .HAS_CIN(1'b0)) u_r2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));
  rca #(.N(3), .HAS_CIN(1'b0)) u_r3 (.a(a3), .b(b3), .ci(ci3), .s(s3), .co(co3));
  rca #(.N(4), .HAS_CIN(1'b0)) u_r4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  rca #(.N(5), .HAS_CIN(1'b0)) u_r5 (.a(a5), .b(b5), .ci(ci5), .s(s5), .co(co5));

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {ci2c, a2c, b2c} = 5'(i);
      #1;
      check("rca2 cin", int'({co2c, s2c}), int'(a2c) + int'(b2c) + int'(ci2c));
    end
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        a2 = 2'(x); b2 = 2'(y); a3 = 3'(x); b3 = 3'(y);
        a4 = 4'(x); b4 = 4'(y); a5 = 5'(x); b5 = 5'(y);
        {ci2, ci3, ci4, ci5} = 4'($urandom);
        #1;
        if (x < 4 && y < 4)  check("rca2", int'({co2, s2}), x + y);
        if (x < 8 && y < 8)  check("rca3", int'({co3, s3}), x + y);
        if (x < 16 && y < 16) check("rca4", int'({co4, s4}), x + y);
        check("rca5", int'({co5, s5}), x + y);
      end
    end
    check("gates rca2 cin", int'(csla_pkg::rca_gates(2, 1'b1)), 26);
    check("gates rca2", int'(csla_pkg::rca_gates(2, 1'b0)), 6 + 13);
    check("gates rca5", int'(csla_pkg::rca_gates(5, 1'b0)), 6 + 4 * 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

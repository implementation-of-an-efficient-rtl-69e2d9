// tb_csla_group: exhaustive check of the carry-select groups of 2, 3, 4 and 5 bits:
// {cout, s} = a + b + cin for every operand pair and both carry-in values. Also checks the
// unit-gate count formula for the 2-bit group: 1 full adder (13) + 1 half adder (6) + 3-bit converter
// (1 inverter, 1 AND, 2 XORs = 12) + 6:3 mux (12) = 43.
module tb_csla_group;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic c2;
  logic [2:0] a3, b3, s3;  logic c3;
  logic [3:0] a4, b4, s4;  logic c4;
  logic [4:0] a5, b5, s5;  logic c5;
  logic cin;

  csla_group #(.N(2)) dut  (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(c2));
  csla_group #(.N(3)) u_g3 (.a(a3), .b(b3), .cin(cin), .s(s3), .cout(c3));
  csla_group #(.N(4)) u_g4 (.a(a4), .b(b4), .cin(cin), .s(s4), .cout(c4));
  csla_group #(.N(5)) u_g5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(c5));

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
    for (int ci = 0; ci < 2; ci++) begin
      for (int x = 0; x < 32; x++) begin
        for (int y = 0; y < 32; y++) begin
          cin = ci[0];
          a2 = 2'(x); b2 = 2'(y); a3 = 3'(x); b3 = 3'(y);
          a4 = 4'(x); b4 = 4'(y); a5 = 5'(x); b5 = 5'(y);
          #1;
          if (x < 4 && y < 4)   check("group2", int'({c2, s2}), x + y + ci);
          if (x < 8 && y < 8)   check("group3", int'({c3, s3}), x + y + ci);
          if (x < 16 && y < 16) check("group4", int'({c4, s4}), x + y + ci);
          check("group5", int'({c5, s5}), x + y + ci);
        end
      end
    end
    check("gates group2", int'(csla_pkg::group_gates(2)), 43);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bec: exhaustive check of the binary to excess-1 converter, x = b + 1 mod 2^N, for the
// 4-bit converter and for the 3-, 5- and 6-bit sizes used in the adder groups. The 4-bit case
// also checks the two ends of the function table explicitly (0000 -> 0001, 1111 -> 0000) and
// the gate count (1 inverter + 3 XORs + 2 ANDs = 18).
module tb_bec;
  int checks = 0, failures = 0;

  logic [3:0] b4, x4;
  logic [2:0] b3, x3;
  logic [4:0] b5, x5;
  logic [5:0] b6, x6;
  bec #(.N(4)) dut  (.b(b4), .x(x4));
  bec #(.N(3)) u_b3 (.b(b3), .x(x3));
  bec #(.N(5)) u_b5 (.b(b5), .x(x5));
  bec #(.N(6)) u_b6 (.b(b6), .x(x6));

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
    b4 = 4'b0000; #1; check("bec4 0000", int'(x4), 4'b0001);
    b4 = 4'b0001; #1; check("bec4 0001", int'(x4), 4'b0010);
    b4 = 4'b1110; #1; check("bec4 1110", int'(x4), 4'b1111);
    b4 = 4'b1111; #1; check("bec4 1111", int'(x4), 4'b0000);
    for (int i = 0; i < 64; i++) begin
      b4 = 4'(i); b3 = 3'(i); b5 = 5'(i); b6 = 6'(i);
      #1;
      if (i < 16) check("bec4", int'(x4), (i + 1) % 16);
      if (i < 8)  check("bec3", int'(x3), (i + 1) % 8);
      if (i < 32) check("bec5", int'(x5), (i + 1) % 32);
      check("bec6", int'(x6), (i + 1) % 64);
    end
    check("gates bec4", int'(csla_pkg::bec_gates(4)), 18);
    check("gates bec3", int'(csla_pkg::bec_gates(3)), 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

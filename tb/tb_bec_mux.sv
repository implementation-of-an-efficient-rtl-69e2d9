// tb_bec_mux: exhaustive check of the 4-bit converter-plus-mux unit: s = b when cin = 0 and
// s = b + 1 (mod 16) when cin = 1. Gate count: 18 (converter) + 16 (8:4 mux) = 34.
module tb_bec_mux;
  int checks = 0, failures = 0;
  logic [3:0] b, s;
  logic cin;

  bec_mux #(.N(4)) dut (.b(b), .cin(cin), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, b} = 5'(i);
      #1;
      checks++;
      if (s !== 4'(int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL cin=%b b=%h s=%h", cin, b, s);
      end
    end
    checks++;
    if ((csla_pkg::bec_gates(4) + csla_pkg::mux_gates(4)) != 34) begin
      failures++;
      $display("FAIL gate count formula");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

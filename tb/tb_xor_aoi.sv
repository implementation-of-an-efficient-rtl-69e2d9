// tb_xor_aoi: exhaustive check of the AOI XOR cell against the ^ operator, plus the unit-gate count formula
// (5). Combinational; a time watchdog ends the run if it hangs.
module tb_xor_aoi;
  logic a, b, y;
  int checks = 0, failures = 0;

  xor_aoi dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (a ^ b)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    checks++;
    if (csla_pkg::AREA_XOR != 5) begin
      failures++;
      $display("FAIL gate count formula");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

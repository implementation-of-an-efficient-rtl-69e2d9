// tb_mux2_aoi: exhaustive check of the AOI 2:1 mux cell and the unit-gate count formula (4).
module tb_mux2_aoi;
  logic d0, d1, sel, y;
  int checks = 0, failures = 0;

  mux2_aoi dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d1=%b d0=%b y=%b", sel, d1, d0, y);
      end
    end
    checks++;
    if (csla_pkg::AREA_MUX2 != 4) begin
      failures++;
      $display("FAIL gate count formula");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

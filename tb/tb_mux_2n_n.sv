// tb_mux_2n_n: checks the 8:4 word mux with random and corner words for both select values,
// and the unit-gate count formula (4 mux cells = 16 gates).
module tb_mux_2n_n;
  int checks = 0, failures = 0;
  logic [3:0] d0, d1, y;
  logic sel;

  mux_2n_n #(.N(4)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {sel, d1, d0} = 9'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d1=%h d0=%h y=%h", sel, d1, d0, y);
      end
    end
    checks++;
    if ((csla_pkg::mux_gates(4)) != 16) begin
      failures++;
      $display("FAIL gate count formula");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

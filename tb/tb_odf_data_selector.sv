// tb_odf_data_selector: exhaustive check of the 4:2 selector: HSS/SER_IN in
// normal mode, TEST_CLK/TDATA_IN in test mode.
module tb_odf_data_selector;
  logic test_en, hss, ser_in, test_clk, tdata_in, shift_clk, fill;
  int checks = 0, failures = 0;

  odf_data_selector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {test_en, hss, ser_in, test_clk, tdata_in} = 5'(v);
      #1;
      checks += 2;
      if (shift_clk !== (test_en ? test_clk : hss)) begin
        failures++;
        $display("FAIL shift_clk for input %b", 5'(v));
      end
      if (fill !== (test_en ? tdata_in : ser_in)) begin
        failures++;
        $display("FAIL fill for input %b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

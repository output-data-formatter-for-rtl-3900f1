// tb_odf_out_demux: exhaustive check of the 1:2 output demultiplexer.
module tb_odf_out_demux;
  logic test_en, q, ser_out, tdata_out;
  int checks = 0, failures = 0;

  odf_out_demux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {test_en, q} = 2'(v);
      #1;
      checks += 2;
      if (ser_out !== (test_en ? 1'b0 : q)) begin
        failures++;
        $display("FAIL ser_out test_en=%b q=%b", test_en, q);
      end
      if (tdata_out !== (test_en ? q : 1'b0)) begin
        failures++;
        $display("FAIL tdata_out test_en=%b q=%b", test_en, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

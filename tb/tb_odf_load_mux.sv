// tb_odf_load_mux: checks that the 2:1 load multiplexer passes the external
// word when sel_loop is low and the loopback word when it is high.
module tb_odf_load_mux;
  import odf_pkg::*;
  import odf_tb_pkg::*;

  logic       sel_loop;
  load_word_t ext, loop, y;
  int checks = 0, failures = 0;

  odf_load_mux dut (.sel_loop, .ext, .loop, .y);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      ext      = rand_word();
      loop     = rand_word();
      sel_loop = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel_loop ? loop : ext)) begin
        failures++;
        $display("FAIL sel=%0b y=%h", sel_loop, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

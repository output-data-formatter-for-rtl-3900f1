// tb_odf_counter: checks the tag counter: clear on reset, one step per
// count_clk rising edge, wrap after 2^11 steps, asynchronous reset mid-count.
module tb_odf_counter;
  import odf_pkg::*;

  logic             reset_n = 1'b1;
  logic             count_clk = 1'b0;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  odf_counter dut (.reset_n, .count_clk, .count);

  task automatic check(string what);
    checks++;
    if (count !== CNT_W'(model)) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, CNT_W'(model));
    end
  endtask

  task automatic pulse();
    #5 count_clk = 1'b1;
    #5 count_clk = 1'b0;
    model++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset_n = 1'b0;
    #3 check("reset");
    reset_n = 1'b1;
    #3 check("after reset release");
    for (int i = 0; i < 37; i++) begin
      pulse();
      #1 check("count step");
    end
    // reset clears at once, without a clock edge
    #2 reset_n = 1'b0; model = 0;
    #1 check("async reset");
    #2 reset_n = 1'b1;
    for (int i = 0; i < (1 << CNT_W) + 3; i++) begin
      pulse();
      if (i % 97 == 0 || i >= (1 << CNT_W) - 2) begin
        #1 check("long run / wrap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

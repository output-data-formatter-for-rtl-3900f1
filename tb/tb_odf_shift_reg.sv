// tb_odf_shift_reg: checks the 96-bit register on its own.  For several
// random frames: load, check the loopback fields, then clock 96 shifts and
// compare q before each edge with the published bit order; the fill bits
// must then appear in order.  Also checks the asynchronous clear.
module tb_odf_shift_reg;
  import odf_pkg::*;
  import odf_tb_pkg::*;

  logic             reset_n = 1'b1;
  logic             c = 1'b0;
  logic             pe = 1'b0;
  load_word_t       pdata;
  logic [CNT_W-1:0] count;
  logic             d = 1'b0;
  logic             q;
  load_word_t       loop;
  logic [SR_W-1:0]  fills;
  int checks = 0, failures = 0;

  odf_shift_reg dut (.reset_n, .c, .pe, .pdata, .count, .d, .q, .loop);

  task automatic edge_c();
    #5 c = 1'b1;
    #5 c = 1'b0;
  endtask

  task automatic expect_bit(logic exp, string what, int i);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s bit %0d: q=%b expected %b", what, i, q, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pdata = '0;
    count = '0;
    #1 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    // after reset every bit is zero
    for (int i = 0; i < SR_W; i++) begin
      #1 expect_bit(1'b0, "reset", i);
      edge_c();
    end
    for (int f = 0; f < 6; f++) begin
      pdata = rand_word();
      count = CNT_W'($urandom);
      pe    = 1'b1;
      edge_c();
      pe    = 1'b0;
      pdata = rand_word();       // inputs may change once loaded
      count = CNT_W'($urandom);
      for (int k = 0; k < SR_W; k++) fills[k] = 1'($urandom);
      begin
        for (int i = 0; i < SR_W; i++) begin
          #1;
          d = fills[i];
          edge_c();
        end
        // q now shows the fill bits in the order they went in
        for (int i = 0; i < SR_W; i++) begin
          #1 expect_bit(fills[i], "fill", i);
          d = 1'b0;
          edge_c();
        end
      end
    end
    // Independent frame check: compare the stream after a load with the
    // field table, using values known to the testbench only.
    for (int f = 0; f < 6; f++) begin
      load_word_t w;
      logic [CNT_W-1:0] n;
      w = rand_word();
      n = CNT_W'($urandom);
      pdata = w;
      count = n;
      pe = 1'b1;
      edge_c();
      pe = 1'b0;
      checks++;
      if (loop !== w) begin
        failures++;
        $display("FAIL loopback fields after load");
      end
      for (int i = 0; i < SR_W; i++) begin
        #1 expect_bit(exp_bit(w, n, i), "frame", i);
        edge_c();
      end
    end
    // asynchronous clear
    pdata = rand_word();
    pdata.caltag = 1'b1;
    pe = 1'b1;
    edge_c();
    pe = 1'b0;
    #1 reset_n = 1'b0;
    #1 expect_bit(1'b0, "async clear", 0);
    checks++;
    if (loop !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

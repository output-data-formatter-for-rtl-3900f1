// tb_odf_fpga: end-to-end check of one formatter device.
//
//  1. Normal frames: load random data, then read 96 bits with HSS; each bit
//     must follow the published field order, exactly one bit per HSS rising
//     edge, and the count tag must be 0, 1, 2, ... for successive loads.
//     After 96 edges SER_OUT must show the SER_IN fill bits.
//  2. LOAD_STRB with LOAD_ENABLE low shifts one bit and does not count.
//  3. Test mode, shift test: a known 96-bit pattern clocked in on TDATA_IN
//     with TEST_CLK comes back on TDATA_OUT; SER_OUT stays low and HSS has no
//     effect.
//  4. Test mode, loopback: after the pattern is in, repeated parallel loads
//     keep every non-counter bit and only the count field changes.
module tb_odf_fpga;
  import odf_pkg::*;
  import odf_tb_pkg::*;

  logic       reset_n = 1'b1;
  logic       load_enable = 1'b0, load_strb = 1'b0;
  load_word_t din = '0;
  logic       hss = 1'b0, ser_in = 1'b0, ser_out;
  logic       test_en = 1'b0, test_clk = 1'b0, tdata_in = 1'b0, tdata_out;
  int checks = 0, failures = 0;

  odf_fpga dut (.*);

  task automatic chk(logic got, logic exp, string what, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s [%0d]: got %b expected %b", what, i, got, exp);
    end
  endtask

  task automatic master_reset();
    #2 reset_n = 1'b0;
    #2 reset_n = 1'b1;
  endtask

  // LOAD_ENABLE set up before the LOAD_STRB rising edge, data held over it.
  task automatic do_load(load_word_t w);
    din = w;
    #3 load_enable = 1'b1;
    #3 load_strb = 1'b1;
    #3 load_strb = 1'b0;
    #3 load_enable = 1'b0;
    din = rand_word();
  endtask

  task automatic pulse_hss();
    #4 hss = 1'b1;
    #4 hss = 1'b0;
  endtask

  task automatic pulse_test_clk();
    #4 test_clk = 1'b1;
    #4 test_clk = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SR_W-1:0]  fills, pat;
    load_word_t       w;
    int               tag;

    master_reset();
    // ---- 1. normal frames ------------------------------------------------
    tag = 0;
    for (int f = 0; f < 5; f++) begin
      w = rand_word();
      do_load(w);
      for (int k = 0; k < SR_W; k++) fills[k] = 1'($urandom);
      for (int i = 0; i < SR_W; i++) begin
        #1 chk(ser_out, exp_bit(w, CNT_W'(tag), i), "frame", i);
        chk(tdata_out, 1'b0, "tdata_out idle", i);
        ser_in = fills[i];
        pulse_hss();
      end
      for (int i = 0; i < 8; i++) begin
        #1 chk(ser_out, fills[i], "fill after frame", i);
        pulse_hss();
      end
      tag++;
    end

    // ---- 2. strobe without enable: one shift, no count -------------------
    w = rand_word();
    do_load(w);
    #1 chk(ser_out, exp_bit(w, CNT_W'(tag), 0), "before bare strobe", 0);
    #3 load_strb = 1'b1;
    #3 load_strb = 1'b0;
    #1 chk(ser_out, exp_bit(w, CNT_W'(tag), 1), "after bare strobe", 1);
    tag++;
    w = rand_word();
    do_load(w);
    for (int i = 0; i < SR_W; i++) begin
      #1 chk(ser_out, exp_bit(w, CNT_W'(tag), i), "frame after bare strobe", i);
      pulse_hss();
    end

    // ---- 3. test mode: shift through ------------------------------------
    master_reset();
    #2 test_en = 1'b1;
    for (int k = 0; k < SR_W; k++) pat[k] = 1'($urandom);
    for (int i = 0; i < SR_W; i++) begin
      tdata_in = pat[i];
      pulse_test_clk();
      pulse_hss();                        // ignored in test mode
      #1 chk(ser_out, 1'b0, "ser_out quiet in test", i);
    end
    for (int i = 0; i < SR_W; i++) begin
      #1 chk(tdata_out, pat[i], "test shift", i);
      tdata_in = pat[i];                  // recirculate
      pulse_test_clk();
    end

    // ---- 4. test mode: loopback over repeated loads ----------------------
    // pattern pat is in the register again; the count is 0 after reset.
    for (int l = 0; l < 7; l++) do_load(rand_word());
    for (int i = 0; i < SR_W; i++) begin
      logic e;
      if (i >= 1 && i <= CNT_W) e = 1'((7 - 1) >> (CNT_W - i));
      else                      e = pat[i];
      #1 chk(tdata_out, e, "loopback", i);
      pulse_test_clk();
    end
    #2 test_en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

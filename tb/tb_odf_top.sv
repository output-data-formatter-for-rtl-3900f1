// tb_odf_top: end-to-end test of the two-device formatter at its default
// size (no parameter overrides).
//
// Normal mode: 170 bits are loaded at once (85 per device); HSS then reads a
// 192-bit stream: device 0's frame, then device 1's frame passed through the
// cascade, then the outside SER_IN fill.  Every bit is compared with the
// published field order, one bit per HSS rising edge, and both devices must
// carry the same tag, advancing by one per load.  The test also drives a
// LOAD_STRB without LOAD_ENABLE, a Master Reset, and the two test-mode
// sequences (shift-through and loopback over repeated loads) on both
// devices' test pins.  Each mechanism is counted; one that never happened
// counts as a failure.
module tb_odf_top;
  import odf_pkg::*;
  import odf_tb_pkg::*;

  localparam int N_DEV = 2;
  localparam int FRAME = N_DEV * SR_W;

  logic                   reset_n = 1'b1;
  logic                   load_enable = 1'b0, load_strb = 1'b0;
  logic                   hss = 1'b0, test_en = 1'b0, test_clk = 1'b0;
  load_word_t [N_DEV-1:0] dev_in = '0;
  logic                   ser_in = 1'b0, ser_out;
  logic       [N_DEV-1:0] tdata_in = '0, tdata_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_reset = 0, n_load = 0, n_tag_step = 0, n_cascade_bits = 0;
  int n_fill_bits = 0, n_bare_strobe = 0, n_test_shift = 0, n_loopback = 0;
  int n_calib_frames = 0, n_lnk_err_flags = 0;

  odf_top dut (.*);

  task automatic chk(logic got, logic exp, string what, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s [%0d]: got %b expected %b", what, i, got, exp);
    end
  endtask

  task automatic master_reset();
    #2 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    n_reset++;
  endtask

  task automatic do_load(load_word_t [N_DEV-1:0] w);
    dev_in = w;
    #3 load_enable = 1'b1;
    #3 load_strb = 1'b1;
    #3 load_strb = 1'b0;
    #3 load_enable = 1'b0;
    for (int k = 0; k < N_DEV; k++) dev_in[k] = rand_word();
  endtask

  task automatic pulse_hss();
    #4 hss = 1'b1;
    #4 hss = 1'b0;
  endtask

  task automatic pulse_test_clk();
    #4 test_clk = 1'b1;
    #4 test_clk = 1'b0;
  endtask

  function automatic logic stream_bit(load_word_t [N_DEV-1:0] w, int tag, int i);
    return exp_bit(w[i / SR_W], CNT_W'(tag), i % SR_W);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_word_t [N_DEV-1:0] w;
    logic [SR_W-1:0]        pat [N_DEV];
    logic [15:0]            fills;
    int                     tag, n_loads;

    master_reset();
    tag = 0;
    // ---- normal frames ----------------------------------------------------
    for (int f = 0; f < 6; f++) begin
      for (int k = 0; k < N_DEV; k++) w[k] = rand_word();
      do_load(w);
      n_load++;
      for (int k = 0; k < N_DEV; k++) begin
        if (w[k].caltag) n_calib_frames++;
        n_lnk_err_flags += $countones(w[k].lnk_err);
      end
      fills = 16'($urandom);
      for (int i = 0; i < FRAME + 16; i++) begin
        #1;
        if (i < FRAME) chk(ser_out, stream_bit(w, tag, i), "stream", i);
        else begin
          chk(ser_out, fills[i - FRAME], "outside fill", i);
          n_fill_bits++;
        end
        if (i >= SR_W && i < FRAME) n_cascade_bits++;
        for (int k = 0; k < N_DEV; k++) chk(tdata_out[k], 1'b0, "tdata idle", i);
        ser_in = (i < 16) ? fills[i] : 1'b0;
        pulse_hss();
      end
      if (f > 0) n_tag_step++;
      tag++;
    end

    // ---- LOAD_STRB without LOAD_ENABLE: one shift, no tag step -----------
    for (int k = 0; k < N_DEV; k++) w[k] = rand_word();
    do_load(w);
    n_load++;
    #3 load_strb = 1'b1;
    #3 load_strb = 1'b0;
    n_bare_strobe++;
    for (int i = 1; i < FRAME; i++) begin
      #1 chk(ser_out, stream_bit(w, tag, i), "after bare strobe", i);
      pulse_hss();
    end
    tag++;
    for (int k = 0; k < N_DEV; k++) w[k] = rand_word();
    do_load(w);
    n_load++;
    n_tag_step++;
    for (int i = 0; i < FRAME; i++) begin
      #1 chk(ser_out, stream_bit(w, tag, i), "tag after bare strobe", i);
      pulse_hss();
    end

    // ---- test mode: shift-through on each device's test pins -------------
    master_reset();
    #2 test_en = 1'b1;
    for (int k = 0; k < N_DEV; k++)
      for (int b = 0; b < SR_W; b++) pat[k][b] = 1'($urandom);
    for (int i = 0; i < SR_W; i++) begin
      for (int k = 0; k < N_DEV; k++) tdata_in[k] = pat[k][i];
      pulse_test_clk();
      pulse_hss();
      #1 chk(ser_out, 1'b0, "ser_out quiet in test", i);
    end
    for (int i = 0; i < SR_W; i++) begin
      #1;
      for (int k = 0; k < N_DEV; k++) begin
        chk(tdata_out[k], pat[k][i], "test shift", i);
        tdata_in[k] = pat[k][i];
      end
      n_test_shift++;
      pulse_test_clk();
    end

    // ---- test mode: loopback over repeated parallel loads ----------------
    n_loads = 5;
    for (int l = 0; l < n_loads; l++) begin
      for (int k = 0; k < N_DEV; k++) w[k] = rand_word();
      do_load(w);
      n_loopback++;
    end
    for (int i = 0; i < SR_W; i++) begin
      #1;
      for (int k = 0; k < N_DEV; k++) begin
        logic e;
        if (i >= 1 && i <= CNT_W) e = 1'((n_loads - 1) >> (CNT_W - i));
        else                      e = pat[k][i];
        chk(tdata_out[k], e, "loopback", i);
      end
      pulse_test_clk();
    end
    #2 test_en = 1'b0;

    // ---- back to normal mode after test: tags continue from the loads ----
    for (int k = 0; k < N_DEV; k++) w[k] = rand_word();
    do_load(w);
    n_load++;
    for (int i = 0; i < FRAME; i++) begin
      #1 chk(ser_out, stream_bit(w, n_loads, i), "normal after test", i);
      pulse_hss();
    end

    // ---- every mechanism must have happened -----------------------------
    $display("mechanisms: reset=%0d load=%0d tag_step=%0d cascade_bits=%0d fill_bits=%0d",
             n_reset, n_load, n_tag_step, n_cascade_bits, n_fill_bits);
    $display("mechanisms: bare_strobe=%0d test_shift=%0d loopback_loads=%0d calib_frames=%0d lnk_err_flags=%0d",
             n_bare_strobe, n_test_shift, n_loopback, n_calib_frames, n_lnk_err_flags);
    checks++;
    if (n_reset == 0 || n_load == 0 || n_tag_step == 0 || n_cascade_bits == 0 ||
        n_fill_bits == 0 || n_bare_strobe == 0 || n_test_shift == 0 ||
        n_loopback == 0 || n_calib_frames == 0 || n_lnk_err_flags == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

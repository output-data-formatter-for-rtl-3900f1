// tb_odf_readout: one complete correlator readout through the default
// two-device formatter.
//
// Six correlator chips of 1600 products each give 9600 words (enough for the
// roughly 8500 antenna pairs).  Each load carries six words, three per device,
// so a readout is 1600 loads of 192 serial bits.  Every bit is compared with
// the published field order; the tag must run 0..1599 without repeating, which
// needs the 11-bit counter (2048 values).  Correlator words are random; link
// error flags and CALTAG are set on a random subset of loads.
module tb_odf_readout;
  import odf_pkg::*;
  import odf_tb_pkg::*;

  localparam int N_DEV   = 2;
  localparam int FRAME   = N_DEV * SR_W;
  localparam int N_CHIPS = 6;
  localparam int PER_CHIP = 1600;
  localparam int N_LOADS = N_CHIPS * PER_CHIP / (N_DEV * N_WORDS);

  logic                   reset_n = 1'b1;
  logic                   load_enable = 1'b0, load_strb = 1'b0;
  logic                   hss = 1'b0, test_en = 1'b0, test_clk = 1'b0;
  load_word_t [N_DEV-1:0] dev_in = '0;
  logic                   ser_in = 1'b0, ser_out;
  logic       [N_DEV-1:0] tdata_in = '0, tdata_out;
  int checks = 0, failures = 0, hss_edges = 0, words = 0;

  odf_top dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_word_t [N_DEV-1:0] w;
    logic [CNT_W-1:0]       tag_seen;
    #2 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    for (int l = 0; l < N_LOADS; l++) begin
      for (int k = 0; k < N_DEV; k++) w[k] = rand_word();
      dev_in = w;
      #3 load_enable = 1'b1;
      #3 load_strb = 1'b1;
      #3 load_strb = 1'b0;
      #3 load_enable = 1'b0;
      words += N_DEV * N_WORDS;
      for (int i = 0; i < FRAME; i++) begin
        #1;
        checks++;
        if (ser_out !== exp_bit(w[i / SR_W], CNT_W'(l), i % SR_W)) begin
          failures++;
          if (failures < 20) $display("FAIL load %0d bit %0d", l, i);
        end
        // collect the tag of device 0 as the ground system would
        if (i >= 1 && i <= CNT_W) tag_seen[CNT_W - i] = ser_out;
        #3 hss = 1'b1;
        #3 hss = 1'b0;
        hss_edges++;
      end
      checks++;
      if (int'(tag_seen) != l) begin
        failures++;
        $display("FAIL tag %0d seen for load %0d", tag_seen, l);
      end
    end
    checks++;
    if (hss_edges != N_LOADS * FRAME || words < 8500) begin
      failures++;
      $display("FAIL edge count %0d / words %0d", hss_edges, words);
    end
    $display("readout: %0d loads, %0d correlator words, %0d HSS edges", N_LOADS, words, hss_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

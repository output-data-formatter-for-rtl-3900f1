// odf_fpga: one Output Data Formatter device.
//
// The device turns one broadside load of correlator results into a serial
// frame for the spacecraft data system.  Holding LOAD_ENABLE high and raising
// LOAD_STRB loads 85 input bits (CALTAG, LNK_ERR_DATA[2:0],
// DATA_FROM_CORR[80:0]) together with an 11-bit tag count into a 96-bit shift
// register and advances the count.  Each later rising edge of HSS presents the
// next bit on SER_OUT and fills the register from SER_IN, so devices can be
// chained SER_OUT to SER_IN.
//
// Structure, as in the published schematic: the register clock C is LOAD_STRB
// OR the selected shift strobe; the counter clock is LOAD_ENABLE AND
// LOAD_STRB; LOAD_ENABLE drives the register's parallel-enable.  One
// consequence is kept deliberately: a LOAD_STRB edge with LOAD_ENABLE low
// shifts one bit and does not count.  TEST_EN switches a 4:2 selector to
// TEST_CLK/TDATA_IN, the output demultiplexer to TDATA_OUT, and the 2:1 load
// multiplexer to loop each non-counter bit back on itself, so a pattern shifted
// in survives repeated loads while the count field advances.
//
// An assertion flags a shift-strobe edge while LOAD_ENABLE is high.
// There is no free-running clock: the strobes clock the logic directly.
// Master Reset is reset_n, active low and asynchronous (its polarity is this
// design's choice); it clears the register and the count.
module odf_fpga
  import odf_pkg::*;
(
  input  logic       reset_n,
  input  logic       load_enable,
  input  logic       load_strb,
  input  load_word_t din,
  input  logic       hss,
  input  logic       ser_in,
  output logic       ser_out,
  input  logic       test_en,
  input  logic       test_clk,
  input  logic       tdata_in,
  output logic       tdata_out
);

  logic             shift_clk, fill, c, count_clk, q;
  logic [CNT_W-1:0] count;
  load_word_t       loop, pdata;

  odf_data_selector u_sel (
    .test_en, .hss, .ser_in, .test_clk, .tdata_in,
    .shift_clk, .fill
  );

  odf_load_mux u_mux (.sel_loop(test_en), .ext(din), .loop, .y(pdata));

  assign count_clk = load_enable & load_strb;
  assign c         = load_strb | shift_clk;

  odf_counter #(.CNT_W(CNT_W)) u_cnt (.reset_n, .count_clk, .count);

  odf_shift_reg u_sr (
    .reset_n, .c, .pe(load_enable), .pdata, .count, .d(fill), .q, .loop
  );

  odf_out_demux u_demux (.test_en, .q, .ser_out, .tdata_out);

  // Read-out rule: LOAD_ENABLE is low whenever the shift strobe rises,
  // otherwise the edge would reload the register instead of shifting it.
  a_no_load_while_shifting: assert property (
    @(posedge shift_clk) !load_enable
  ) else $error("shift strobe rose while LOAD_ENABLE was high");

endmodule

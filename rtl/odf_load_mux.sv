// odf_load_mux: the 2:1 multiplexer in front of the shift register's
// parallel inputs.
//
// With sel_loop low (normal mode) the register is loaded from the external
// word: correlator data, link-error flags and CALTAG.  With sel_loop high
// (test mode, driven by TEST_EN) each non-counter register bit is fed back
// from its own output, so repeated parallel loads leave those bits unchanged
// while only the count field takes new values.  Purely combinational.
module odf_load_mux
  import odf_pkg::*;
(
  input  logic       sel_loop,
  input  load_word_t ext,
  input  load_word_t loop,
  output load_word_t y
);

  always_comb y = sel_loop ? loop : ext;

endmodule

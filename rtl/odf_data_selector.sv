// odf_data_selector: the 4:2 data selector that picks the shift clock and
// the serial fill bit.
//
// Normal mode (test_en low): shift_clk = HSS from the spacecraft data system
// and fill = SER_IN from the next device of a cascade.  Test mode (test_en
// high): shift_clk = TEST_CLK and fill = TDATA_IN from the controller.
// Purely combinational; the selected clock is ORed with LOAD_STRB to clock the
// shift register.
module odf_data_selector (
  input  logic test_en,
  input  logic hss,
  input  logic ser_in,
  input  logic test_clk,
  input  logic tdata_in,
  output logic shift_clk,
  output logic fill
);

  always_comb begin
    shift_clk = test_en ? test_clk : hss;
    fill      = test_en ? tdata_in : ser_in;
  end

endmodule

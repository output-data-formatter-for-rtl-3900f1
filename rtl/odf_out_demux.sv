// odf_out_demux: the 1:2 demultiplexer on the serial output.
//
// The shift register output q goes to SER_OUT (towards the spacecraft data
// system or the next device of a cascade) when test_en is low and to
// TDATA_OUT (towards the controller) when test_en is high.  The output that
// is not selected is held low; that level is this design's choice.
// Purely combinational.
module odf_out_demux (
  input  logic test_en,
  input  logic q,
  output logic ser_out,
  output logic tdata_out
);

  always_comb begin
    ser_out   = q & ~test_en;
    tdata_out = q &  test_en;
  end

endmodule

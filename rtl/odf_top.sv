// odf_top: the complete Output Data Formatter, N_DEV cascaded devices.
//
// The published formatter takes 170 bits of correlator and error data in
// parallel and splits them over two identical devices of 85 bits each.  The
// devices share the load, shift and test controls.  They are chained: the
// serial output of device k+1 feeds the serial input of device k, and device 0
// drives the spacecraft data system.  After one load, HSS therefore reads a
// continuous stream of N_DEV*96 bits: device 0's frame, then device 1's, and
// so on, then whatever is on ser_in.  N_DEV = 2 is the published size; larger
// values model the cascade expansion the device was designed for.
//
// Each device's test pins (TDATA_IN/TDATA_OUT) are brought out separately; how
// a controller wires them is not fixed by this design.  The counters of all
// devices advance together, so every frame carries the same tag.
module odf_top
  import odf_pkg::*;
#(
  parameter int unsigned N_DEV = 2
) (
  input  logic                   reset_n,
  input  logic                   load_enable,
  input  logic                   load_strb,
  input  logic                   hss,
  input  logic                   test_en,
  input  logic                   test_clk,
  input  load_word_t [N_DEV-1:0] dev_in,
  input  logic                   ser_in,
  output logic                   ser_out,
  input  logic       [N_DEV-1:0] tdata_in,
  output logic       [N_DEV-1:0] tdata_out
);

  // chain[k] is the serial input of device k; chain[N_DEV] is the outside fill.
  logic [N_DEV:0] chain;
  logic [N_DEV-1:0] dev_out;

  assign chain[N_DEV] = ser_in;

  for (genvar k = 0; k < N_DEV; k++) begin : g_dev
    odf_fpga u_dev (
      .reset_n, .load_enable, .load_strb, .din(dev_in[k]),
      .hss, .ser_in(chain[k+1]), .ser_out(dev_out[k]),
      .test_en, .test_clk, .tdata_in(tdata_in[k]), .tdata_out(tdata_out[k])
    );
    if (k > 0) begin : g_link
      assign chain[k] = dev_out[k];
    end
  end

  assign chain[0] = dev_out[0];
  assign ser_out  = chain[0];

endmodule

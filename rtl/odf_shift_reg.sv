// odf_shift_reg: the 96-bit parallel-in, serial-out register of one
// formatter device.
//
// On each rising edge of clock c the register either loads in parallel
// (pe high) or shifts by one bit (pe low).  A parallel load writes the frame
// image of odf_pkg::pack_frame: CALTAG, the 11-bit count, then each 27-bit
// correlator word followed by its link-error flag, all most significant bit
// first, which is the published output order.  Output q is the top bit, so the
// first bit of a frame is visible as soon as the load is done and every
// following clock edge presents the next one while bit 0 takes the serial fill
// d.  loop returns the non-counter fields for the test-mode loopback.
// Master Reset (reset_n, active low, asynchronous) clears every bit.
//
// Timing: c is the OR of LOAD_STRB and the selected shift strobe; pe, pdata,
// count and d must be stable around its rising edge.
module odf_shift_reg
  import odf_pkg::*;
(
  input  logic             reset_n,
  input  logic             c,
  input  logic             pe,
  input  load_word_t       pdata,
  input  logic [CNT_W-1:0] count,
  input  logic             d,
  output logic             q,
  output load_word_t       loop
);

  logic [SR_W-1:0] sr;

  always_ff @(posedge c or negedge reset_n) begin
    if (!reset_n) sr <= '0;
    else if (pe)  sr <= pack_frame(pdata, count);
    else          sr <= {sr[SR_W-2:0], d};
  end

  assign q    = sr[SR_W-1];
  assign loop = unpack_frame(sr);

endmodule

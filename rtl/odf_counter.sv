// odf_counter: the formatter's tag counter.
//
// An up counter of CNT_W bits (11 in the published design).  It is cleared by
// the asynchronous, active-low Master Reset and advances by one on every
// rising edge of count_clk.  In the formatter count_clk is LOAD_ENABLE AND
// LOAD_STRB, so the count advances once per parallel load and never while data
// is being shifted out.  Because the shift register loads on the same edge, the
// register captures the value held before the edge: the first frame after
// reset carries tag 0.  The counter wraps from all-ones to zero; what happens
// at that point is this design's choice.
module odf_counter #(
  parameter int unsigned CNT_W = odf_pkg::CNT_W
) (
  input  logic             reset_n,
  input  logic             count_clk,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge count_clk or negedge reset_n) begin
    if (!reset_n) count <= '0;
    else          count <= count + 1'b1;
  end

endmodule

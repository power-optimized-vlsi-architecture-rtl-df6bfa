// decision: decision device that truncates a fed-back value to B' bits.
//
// A plain cut to the upper byte would turn every small value into zero and
// stop the adaptation, so the device is a 2:1 multiplexer over the two
// halves of the 16-bit input: it passes the upper half din[15:8] by
// default and the lower half din[7:0] when the upper half is all zero.
// The same device truncates the errors (four instances) and the updated
// weights (sixteen instances). Combinational; `hi_sel` reports which half
// was passed. Reading "the MSB is 0" as "the upper half is all zero" is
// this design's interpretation.
module decision #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8
) (
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout,
  output logic             hi_sel
);

  always_comb begin
    hi_sel = |din[IN_W-1:IN_W-OUT_W];
    dout   = hi_sel ? din[IN_W-1:IN_W-OUT_W] : din[OUT_W-1:0];
  end

endmodule

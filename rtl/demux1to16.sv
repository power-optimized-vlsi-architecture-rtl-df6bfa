// demux1to16: 1-to-OUTS demultiplexer with held outputs.
//
// When `en` is high, `din` is written to output `sel` on the clock edge;
// every other output keeps its value, so after OUTS enabled cycles all
// outputs are filled. With `en` low nothing toggles. Outputs reset to 0
// (synchronous, active-low rst_n). Used three times: DMUX1 collecting the
// 16 partial filter products u, the collector for the 16 weight increment
// products v, and the demultiplexer for the 16 updated weights.
module demux1to16 #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned OUTS  = 16,
  localparam int unsigned SW   = $clog2(OUTS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [SW-1:0]             sel,
  input  logic [WIDTH-1:0]          din,
  output logic [OUTS-1:0][WIDTH-1:0] dout
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout <= '0;
    end else if (en) begin
      dout[sel] <= din;
    end
  end

endmodule

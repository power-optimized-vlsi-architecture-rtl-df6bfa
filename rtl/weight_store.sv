// weight_store: the N filter weights, each written through its decision device.
//
// Holds the N weights of B' bits that SW2 feeds to the MAC. Each of the N
// updated, untruncated WIDTH-bit weights w_full[n] has its own decision
// device (upper byte unless zero, else lower byte). During the truncation
// phase one weight is loaded per cycle: with `en` high, w[sel] takes the
// truncated value of w_full[sel] on the clock edge, so all N weights are
// renewed in N cycles. `hi_sel` tells which half the written weight's
// decision device passed. Synchronous active-low reset sets all weights
// to zero (the initial weights are this design's choice).
module weight_store #(
  parameter int unsigned B     = 8,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned N     = 16,
  localparam int unsigned SW   = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [SW-1:0]           sel,
  input  logic [N-1:0][WIDTH-1:0] w_full,
  output logic [N-1:0][B-1:0]     w,
  output logic                    hi_sel
);

  logic [N-1:0][B-1:0] w_trunc;
  logic [N-1:0]        hi;

  for (genvar n = 0; n < N; n++) begin : g_dec
    decision #(.IN_W(WIDTH), .OUT_W(B)) u_dec (
      .din(w_full[n]), .dout(w_trunc[n]), .hi_sel(hi[n])
    );
  end

  always_comb begin
    hi_sel = 1'b0;
    for (int n = 0; n < N; n++) begin
      if (SW'(n) == sel) hi_sel = hi[n];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w <= '0;
    end else if (en) begin
      for (int n = 0; n < N; n++) begin
        if (SW'(n) == sel) w[n] <= w_trunc[n];
      end
    end
  end

endmodule

// mu_mul: step-size multiplier, inc = (mu * v) >> MU_W.
//
// mu is an unsigned MU_W-bit fraction (mu/16 for the 4-bit default, so
// 0 .. 15/16); v is the WIDTH-bit weight increment product v(i,j). The
// shift-and-add product is MU_W + WIDTH bits wide and its top WIDTH bits
// form the weight increment term. Purely combinational. The fractional
// reading of mu and the truncation to WIDTH bits are this design's choice.
module mu_mul #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned MU_W  = 4
) (
  input  logic [WIDTH-1:0] v,
  input  logic [MU_W-1:0]  mu,
  output logic [WIDTH-1:0] inc
);

  logic [WIDTH+MU_W-1:0] prod;

  always_comb begin
    prod = '0;
    for (int k = 0; k < MU_W; k++) begin
      if (mu[k]) prod = prod + ({{MU_W{1'b0}}, v} << k);
    end
    inc = prod[WIDTH+MU_W-1:MU_W];
  end

endmodule

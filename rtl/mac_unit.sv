// mac_unit: shared multiply-accumulate block of the DA-BLMS filter.
//
// Computes the L-term dot product  sum_l a[l] * b[l]  of one row of the
// input matrix (a, from selection device SW) with L values from selection
// device SW2 (b): either the weight sub-vector c_k^j, giving a partial
// filter product u(i,j), or the truncated error vector, giving a weight
// increment product v(i,j). Each product comes from an 8x8 Vedic
// multiplier; L-1 16-bit ripple carry adders sum them (modulo 2**WIDTH).
// A demultiplexer steered by CTR1 routes the result to `u` (ctr1 = 1) or
// `v` (ctr1 = 0); the unselected output is 0.
// When `en` is low the operands are held at zero so the multipliers and
// adders do not toggle (operand isolation, this design's way of keeping the
// block idle between uses). Purely combinational.
module mac_unit #(
  parameter int unsigned B     = 8,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned L     = 4
) (
  input  logic                  en,
  input  logic                  ctr1,
  input  logic [L-1:0][B-1:0]   a,
  input  logic [L-1:0][B-1:0]   b,
  output logic [WIDTH-1:0]      u,
  output logic [WIDTH-1:0]      v
);

  logic [L-1:0][B-1:0]     a_g, b_g;
  logic [L-1:0][2*B-1:0]   prod;
  logic [L-1:0][WIDTH-1:0] acc;
  logic [WIDTH-1:0]        result;

  // The Vedic multipliers are 8x8.
  if (B != 8) begin : g_bad_b
    $error("mac_unit: B must be 8 (8x8 Vedic multipliers)");
  end

  assign a_g = en ? a : '0;
  assign b_g = en ? b : '0;

  for (genvar l = 0; l < L; l++) begin : g_mul
    vedic_mult u_vedic (.a(a_g[l]), .b(b_g[l]), .p(prod[l]));
  end

  // Adder tree as a chain of L-1 ripple carry adders.
  assign acc[0] = WIDTH'(prod[0]);
  for (genvar l = 1; l < L; l++) begin : g_add
    logic unused_cout;
    rca #(.WIDTH(WIDTH)) u_rca (
      .a(acc[l-1]), .b(WIDTH'(prod[l])), .cin(1'b0),
      .sum(acc[l]), .cout(unused_cout)
    );
  end
  assign result = acc[L-1];

  // CTR1 demultiplexer.
  always_comb begin
    u = ctr1 ? result : '0;
    v = ctr1 ? '0 : result;
  end

endmodule

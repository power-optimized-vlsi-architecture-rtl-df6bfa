// rca: WIDTH-bit ripple carry adder.
//
// A chain of full adders; the carry ripples from bit 0 to bit WIDTH-1.
// sum = a + b + cin modulo 2**WIDTH, cout is the carry out of the top bit.
// Purely combinational. The 16-bit default is the width of the adder used
// in the MAC and the weight update; the full-adder chain is the textbook
// ripple structure.
module rca #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < WIDTH; k++) begin : g_fa
    assign sum[k]   = a[k] ^ b[k] ^ c[k];
    assign c[k+1]   = (a[k] & b[k]) | (a[k] & c[k]) | (b[k] & c[k]);
  end

  assign cout = c[WIDTH];

endmodule

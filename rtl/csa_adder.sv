// csa_adder: NUM_OPS-operand carry save adder, WIDTH bits.
//
// Adds the M partial filter products u(i,0..M-1) belonging to one filter
// output y(kL-i) in a single step. Operands are reduced with a chain of
// 3:2 carry save compressors (sum = a^b^c, carry = majority(a,b,c) << 1),
// and the final sum/carry pair is resolved by a ripple carry adder.
// The result is modulo 2**WIDTH (16 bits, the width of the y outputs).
// Purely combinational. Four operands is the document's figure for N=16,
// L=4; the compressor chain is this design's choice of CSA layout.
module csa_adder #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned NUM_OPS = 4
) (
  input  logic [NUM_OPS-1:0][WIDTH-1:0] ops,
  output logic [WIDTH-1:0]              sum
);

  // Stage k holds the redundant (save, carry) pair after k compressions.
  logic [NUM_OPS-1:0][WIDTH-1:0] s_st;
  logic [NUM_OPS-1:0][WIDTH-1:0] c_st;
  logic                          unused_cout;

  assign s_st[0] = ops[0];
  assign c_st[0] = '0;

  for (genvar k = 1; k < NUM_OPS; k++) begin : g_csa
    logic [WIDTH-2:0] maj; // the top carry falls outside the WIDTH-bit result
    assign s_st[k] = s_st[k-1] ^ c_st[k-1] ^ ops[k];
    assign maj     = (s_st[k-1][WIDTH-2:0] & c_st[k-1][WIDTH-2:0])
                   | (s_st[k-1][WIDTH-2:0] & ops[k][WIDTH-2:0])
                   | (c_st[k-1][WIDTH-2:0] & ops[k][WIDTH-2:0]);
    assign c_st[k] = {maj, 1'b0};
  end

  rca #(.WIDTH(WIDTH)) u_final (
    .a(s_st[NUM_OPS-1]), .b(c_st[NUM_OPS-1]), .cin(1'b0),
    .sum(sum), .cout(unused_cout)
  );

endmodule

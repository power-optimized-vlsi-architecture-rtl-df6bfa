// ebsg: error block, e(kL-i) = d(kL-i) - y(kL-i) for the L outputs of a block.
//
// Each lane subtracts the filter output from the desired output with a
// ripple carry adder (d + ~y + 1), modulo 2**WIDTH. The raw 16-bit error
// vector then goes to the decision devices for truncation before it is
// fed back. Purely combinational.
module ebsg #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned LANES = 4
) (
  input  logic [LANES-1:0][WIDTH-1:0] d,
  input  logic [LANES-1:0][WIDTH-1:0] y,
  output logic [LANES-1:0][WIDTH-1:0] e
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic unused_cout;
    rca #(.WIDTH(WIDTH)) u_sub (
      .a(d[i]), .b(~y[i]), .cin(1'b1), .sum(e[i]), .cout(unused_cout)
    );
  end

endmodule

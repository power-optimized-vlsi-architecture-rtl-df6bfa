// vedic2: 2x2 unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// Vertical product a0b0 gives p[0]; the crosswise products a1b0 and a0b1
// meet in a half adder for p[1]; the vertical product a1b1 and that carry
// meet in a second half adder for p[3:2]. Purely combinational, p = a * b.
// This is the leaf of the 4x4 and 8x8 Vedic multipliers.
module vedic2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic x10, x01, x11, c1;

  always_comb begin
    x10  = a[1] & b[0];
    x01  = a[0] & b[1];
    x11  = a[1] & b[1];
    c1   = x10 & x01;
    p[0] = a[0] & b[0];
    p[1] = x10 ^ x01;
    p[2] = x11 ^ c1;
    p[3] = x11 & c1;
  end

endmodule

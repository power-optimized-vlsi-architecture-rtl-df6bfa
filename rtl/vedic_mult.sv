// vedic_mult: 8x8 unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The MAC's multiplier. With a = {ah, al} and b = {bh, bl} (4-bit halves),
// four 4x4 Vedic multipliers form the vertical products al*bl, ah*bh and
// the crosswise products ah*bl, al*bh. A ripple carry adder adds the two
// crosswise products; a second one adds that sum at weight 4 to
// {ah*bh, high half of al*bl}, whose fields do not overlap. Purely
// combinational: p = a * b, 16 bits, exact. The 8x8 size built from 4x4
// Vedic multipliers follows the document; the adder arrangement is the
// usual one for this multiplier.
module vedic_mult (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0]  q0, q1, q2, q3; // al*bl, ah*bl, al*bh, ah*bh
  logic [7:0]  mid;
  logic        mid_c;
  logic [11:0] upper;
  logic        unused_c;

  vedic4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  rca #(.WIDTH(8)) u_add_mid (.a(q1), .b(q2), .cin(1'b0), .sum(mid), .cout(mid_c));

  rca #(.WIDTH(12)) u_add_hi (
    .a({q3, q0[7:4]}), .b({3'b000, mid_c, mid}), .cin(1'b0),
    .sum(upper), .cout(unused_c)
  );

  assign p = {upper, q0[3:0]};

endmodule

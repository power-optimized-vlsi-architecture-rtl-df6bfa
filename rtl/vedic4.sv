// vedic4: 4x4 unsigned Vedic multiplier built from four 2x2 Vedic multipliers.
//
// With a = {ah, al} and b = {bh, bl}: the vertical products al*bl and
// ah*bh and the crosswise products ah*bl and al*bh come from vedic2
// blocks; the crosswise pair is added by a ripple carry adder, and that
// sum is added at weight 2 to {ah*bh, high half of al*bl}. Purely
// combinational, p = a * b exactly.
module vedic4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q0, q1, q2, q3; // al*bl, ah*bl, al*bh, ah*bh
  logic [3:0] mid;
  logic       mid_c;
  logic [5:0] upper;
  logic       unused_c;

  vedic2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rca #(.WIDTH(4)) u_add_mid (.a(q1), .b(q2), .cin(1'b0), .sum(mid), .cout(mid_c));

  rca #(.WIDTH(6)) u_add_hi (
    .a({q3, q0[3:2]}), .b({1'b0, mid_c, mid}), .cin(1'b0),
    .sum(upper), .cout(unused_c)
  );

  assign p = {upper, q0[1:0]};

endmodule

// vedic_4x4_m: 4x4-bit unsigned Vedic multiplier built from four 2x2 multipliers.
//
// The operands are split into 2-bit halves. The four 2x2 multipliers form
//   m0 = a[1:0]*b[1:0], m1 = a[1:0]*b[3:2], m2 = a[3:2]*b[1:0], m3 = a[3:2]*b[3:2],
// each a 4-bit product. They are combined with the same overlapping scheme as the
// 8x8 multiplier, one level down, with three 4-bit Brent-Kung adders:
//   adder 1: s1 = m1 + m2 (the two crosswise products share weight 2^2), carry c1;
//   adder 2: s2 = s1 + m0[3:2], carry c2; p[3:2] = s2[1:0], and p[1:0] = m0[1:0];
//   adder 3: p[7:4] = m3 + {c1 | c2, s2[3:2]}.
// c1 and c2 both have weight 2^6 and are never both 1 (the 5-bit value {c1,s1}
// plus m0[3:2] is at most 20 < 32), so their OR is their sum. Adder 2's carry c2
// cannot be left out: a = 4'b1011, b = 4'b1111 gives s1 = 15 and m0[3:2] = 2, so
// c2 = 1 while c1 = 0.
// That the 4x4 block is made of 2x2 multipliers and Brent-Kung adders follows the
// description this design was built from; the way they are wired is this design's
// choice, mirroring the 8x8 level.
//
// Interface: a, b (4 bits each) in; p (8 bits) = a * b out. Combinational.
module vedic_4x4_m (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] m0, m1, m2, m3;
  logic [3:0] s1, s2, hi;
  logic       c1, c2, c3;

  vedic_2x2_m u_m0 (.a(a[1:0]), .b(b[1:0]), .p(m0));
  vedic_2x2_m u_m1 (.a(a[1:0]), .b(b[3:2]), .p(m1));
  vedic_2x2_m u_m2 (.a(a[3:2]), .b(b[1:0]), .p(m2));
  vedic_2x2_m u_m3 (.a(a[3:2]), .b(b[3:2]), .p(m3));

  brent_kung_adder #(.WIDTH(4)) u_bk1 (
    .a(m1), .b(m2), .cin(1'b0), .sum(s1), .cout(c1)
  );
  brent_kung_adder #(.WIDTH(4)) u_bk2 (
    .a(s1), .b({2'b00, m0[3:2]}), .cin(1'b0), .sum(s2), .cout(c2)
  );
  brent_kung_adder #(.WIDTH(4)) u_bk3 (
    .a(m3), .b({1'b0, c1 | c2, s2[3:2]}), .cin(1'b0), .sum(hi), .cout(c3)
  );

  assign p = {hi, s2[1:0], m0[1:0]};

  // The product fits in 8 bits, so the last adder never carries out, and the two
  // carries that meet at weight 2^6 are never both set.
  always_comb begin
    assert (!(c1 && c2)) else $error("vedic_4x4_m: both middle carries set");
    assert (!c3) else $error("vedic_4x4_m: carry out of the high adder");
  end
endmodule

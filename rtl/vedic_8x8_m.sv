// vedic_8x8_m: 8x8-bit unsigned Vedic multiplier whose partial products are summed
// by Brent-Kung adders.
//
// Each operand is split into nibbles and four 4x4 Vedic multipliers form the 8-bit
// partial products
//   m3 = a[7:4]*b[7:4] (weight 2^8),  m1 = a[3:0]*b[7:4] and m2 = a[7:4]*b[3:0]
//   (weight 2^4),  m0 = a[3:0]*b[3:0] (weight 2^0).
// They occupy four overlapping nibble regions of the product and are merged by three
// 8-bit Brent-Kung adders:
//   P[3:0]  = m0[3:0], taken straight from the low multiplier;
//   adder 1 adds the two middle products: s1 = m1 + m2, carry c1;
//   adder 2 adds the upper nibble of m0 to that sum: s2 = s1 + m0[7:4], carry c2,
//           and P[7:4] = s2[3:0];
//   adder 3 adds m3 to {c1 | c2, s2[7:4]}, the carry entering at the fifth bit of the
//           addend and s2[7:4] as its low nibble: P[15:8] = its sum.
// The split, the four multipliers, the three adders and what each adds follow the
// description this design was built from. It routes only adder 1's carry to the
// fifth bit of adder 3; this design also routes adder 2's carry there, since without
// it some products come out wrong (a = 8'h8F, b = 8'h9F gives s1 = 8'hFF and
// m0[7:4] = 4'hE, so c2 = 1 while c1 = 0). The two carries both weigh 2^12 and are
// never both 1 ({c1,s1} + m0[7:4] <= 465 < 512), so an OR merges them.
//
// Interface: a, b (8 bits each) in; p (16 bits) = a * b out. Purely combinational:
// the product is valid one propagation delay after the operands, with no clock.
module vedic_8x8_m (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] m0, m1, m2, m3;
  logic [7:0] s1, s2, hi;
  logic       c1, c2, c3;

  // The four nibble products.
  vedic_4x4_m a41 (.a(a[3:0]), .b(b[3:0]), .p(m0));
  vedic_4x4_m a42 (.a(a[3:0]), .b(b[7:4]), .p(m1));
  vedic_4x4_m a43 (.a(a[7:4]), .b(b[3:0]), .p(m2));
  vedic_4x4_m a44 (.a(a[7:4]), .b(b[7:4]), .p(m3));

  // BK adder 1: the overlapping middle region.
  brent_kung_adder #(.WIDTH(8)) fa4 (
    .a(m1), .b(m2), .cin(1'b0), .sum(s1), .cout(c1)
  );
  // BK adder 2: upper nibble of the low product into the middle sum.
  brent_kung_adder #(.WIDTH(8)) fa5 (
    .a(s1), .b({4'h0, m0[7:4]}), .cin(1'b0), .sum(s2), .cout(c2)
  );
  // BK adder 3: high product plus what overflows the middle region.
  brent_kung_adder #(.WIDTH(8)) fa6 (
    .a(m3), .b({3'b000, c1 | c2, s2[7:4]}), .cin(1'b0), .sum(hi), .cout(c3)
  );

  assign p = {hi, s2[3:0], m0[3:0]};

  // The product fits in 16 bits, so adder 3 never carries out, and the two carries
  // that meet at weight 2^12 are never both set.
  always_comb begin
    assert (!(c1 && c2)) else $error("vedic_8x8_m: both middle carries set");
    assert (!c3) else $error("vedic_8x8_m: carry out of the high adder");
  end
endmodule

// vedic_2x2_m: 2x2-bit unsigned multiplier by the vertical-and-crosswise rule
// (Urdhva Tiryagbhyam), the basic building block of the 4x4 multiplier.
//
// The rule forms each product column at once: the "vertical" column 0 is a0*b0, the
// "crosswise" column 1 is a1*b0 + a0*b1, and the vertical column 2 is a1*b1 plus the
// carry out of column 1. Each column sum is done with one half adder (XOR for the
// sum, AND for the carry), so the whole block is four AND gates and two half adders.
// That the 2x2 block is the building block follows the description this design was
// built from; the gate-level form is the standard one for this rule, chosen here.
//
// Interface: a, b (2 bits each) in; p (4 bits) = a * b out. Combinational.
module vedic_2x2_m (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp10, pp01, pp11;  // partial products a_i & b_j
  logic c1;                      // carry out of column 1

  assign pp00 = a[0] & b[0];
  assign pp10 = a[1] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp11 = a[1] & b[1];

  assign p[0] = pp00;             // vertical
  assign p[1] = pp10 ^ pp01;      // crosswise, half-adder sum
  assign c1   = pp10 & pp01;      // crosswise, half-adder carry
  assign p[2] = pp11 ^ c1;        // vertical plus carry
  assign p[3] = pp11 & c1;
endmodule

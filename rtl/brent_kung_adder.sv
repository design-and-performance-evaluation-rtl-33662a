// brent_kung_adder: WIDTH-bit parallel-prefix adder with a Brent-Kung carry tree.
//
// The addition runs in the three stages of the classic carry-lookahead family:
//   1. pre-processing: per bit, propagate P_i = a_i ^ b_i and generate G_i = a_i & b_i;
//   2. carry network: group generate/propagate pairs are merged with the prefix
//      operator (G,P) o (G',P') = (G | P&G', P&P'). The Brent-Kung tree does this in an
//      up-sweep of log2(WIDTH) levels, where level l merges bit i with bit i-2^l for
//      every i whose (i+1) is a multiple of 2^(l+1), followed by a down-sweep of
//      log2(WIDTH)-1 levels that fills in the remaining prefixes. After the tree,
//      G at bit i equals the carry C_i = G_i | P_i & C_(i-1) out of bit i;
//   3. post-processing: S_i = P_i ^ C_(i-1).
// The carry-in is folded into bit 0 before the tree (G_0 := G_0 | P_0 & cin), so it is
// C_(-1) of the equations. The three stages and their equations follow the
// description this adder was built from; the carry-in port and the up/down-sweep
// indexing are the usual textbook Brent-Kung form, chosen here.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
// WIDTH must be a power of two, at least 2. The default, 8, is the width of the
// three adders of the 8x8 multiplier; the 4x4 multiplier uses WIDTH = 4.
module brent_kung_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = $clog2(WIDTH);
  localparam int unsigned STAGES = 2 * LEVELS - 1;

  // Width check, evaluated at elaboration.
  if (WIDTH < 2 || (1 << LEVELS) != WIDTH) begin : g_bad_width
    $error("brent_kung_adder: WIDTH must be a power of two >= 2");
  end

  // Pre-processing.
  logic [WIDTH-1:0] p_bit, g_bit;
  assign p_bit = a ^ b;
  assign g_bit = a & b;

  // gs[s]/ps[s] are the group generate/propagate after s stages of the tree.
  logic [WIDTH-1:0] gs [STAGES+1];
  logic [WIDTH-1:0] ps [STAGES+1];

  assign gs[0] = {g_bit[WIDTH-1:1], g_bit[0] | (p_bit[0] & cin)};
  assign ps[0] = p_bit;

  // Carry tree.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam bit          UP   = (s < LEVELS);
    localparam int unsigned LV   = UP ? s : (STAGES - 1 - s);
    localparam int unsigned DIST = 1 << LV;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit_node
      localparam bit MERGE = UP ? (((i + 1) % (2 * DIST)) == 0)
                                : ((((i + 1) % (2 * DIST)) == DIST) && (i >= 2 * DIST));
      if (MERGE) begin : g_black
        assign gs[s+1][i] = gs[s][i] | (ps[s][i] & gs[s][i-DIST]);
        assign ps[s+1][i] = ps[s][i] & ps[s][i-DIST];
      end else begin : g_pass
        assign gs[s+1][i] = gs[s][i];
        assign ps[s+1][i] = ps[s][i];
      end
    end
  end

  // Post-processing.
  logic [WIDTH-1:0] carry;
  assign carry = gs[STAGES];
  assign sum   = p_bit ^ {carry[WIDTH-2:0], cin};
  assign cout  = carry[WIDTH-1];

endmodule

// 4x4 Urdhva Tiryakbhyam multiplier built from reversible gates: four
// reversible 2x2 multipliers and three 4-bit reversible abacus adders.
//
//   p = a * b,  a and b 4 bits, p 8 bits (S7..S0)
//
// How it works.  Split a = {aH, aL} and b = {bH, bL} into 2-bit halves.
// The four 2x2 products are HH = aH*bH, HL = aH*bL, LH = aL*bH and
// LL = aL*bL, all formed at once, and
//   p = HH<<4 + (HL + LH)<<2 + LL.
//   Adder 1: HL + LH                 -> m[3:0], carry ca1 (weight 64)
//   Adder 2: m + {00, LL[3:2]}       -> t[3:0], carry ca2 (weight 64)
//            p[1:0] = LL[1:0], p[3:2] = t[1:0]
//   Adder 3: HH + {0, ca1^ca2, t[3:2]} -> p[7:4], carry ca3
// ca1 and ca2 both land on weight 64.  They are never 1 together (ca1 = 1
// needs HL + LH >= 16, so m <= 2 and m + LL[3:2] <= 4), so a Feynman gate
// merges them into adder 3's bit 2 as ca1 ^ ca2.  ca3 is 0 for every pair of
// 4-bit operands (15 * 15 < 256); it is kept as an output, as in the
// reference block diagram.
//
// The split into four 2x2 multipliers and three 4-bit adders, and which
// product feeds which adder, follow the reference block diagram; that
// diagram does not show how ca1 and ca2 are joined, and the Feynman merge is
// this implementation's.  Each adder is the reversible NFT/F2G adder with a
// carry in tied to 0.  Combinational.
module vedic4x4_rev
  import abacus_pkg::*;
(
  input  nibble_t  a,
  input  nibble_t  b,
  output product_t p,
  output logic     ca3
);

  nibble_t pp_hh, pp_hl, pp_lh, pp_ll;   // 2x2 partial products
  nibble_t m, t, s_hi;
  logic    ca1, ca2, ca_merged, g_fg;

  ut2x2_rev u_mul_hh (.a(a[3:2]), .b(b[3:2]), .q(pp_hh));
  ut2x2_rev u_mul_hl (.a(a[3:2]), .b(b[1:0]), .q(pp_hl));
  ut2x2_rev u_mul_lh (.a(a[1:0]), .b(b[3:2]), .q(pp_lh));
  ut2x2_rev u_mul_ll (.a(a[1:0]), .b(b[1:0]), .q(pp_ll));

  rev_abacus_adder #(.NIBBLES(1)) u_add1 (
    .a(pp_hl), .b(pp_lh), .cin(1'b0), .s(m), .cout(ca1)
  );

  rev_abacus_adder #(.NIBBLES(1)) u_add2 (
    .a(m), .b({2'b00, pp_ll[3:2]}), .cin(1'b0), .s(t), .cout(ca2)
  );

  gate_fg u_fg_merge (.a(ca1), .b(ca2), .p(g_fg), .q(ca_merged));

  rev_abacus_adder #(.NIBBLES(1)) u_add3 (
    .a(pp_hh), .b({1'b0, ca_merged, t[3:2]}), .cin(1'b0), .s(s_hi), .cout(ca3)
  );

  assign p = {s_hi, t[1:0], pp_ll[1:0]};

endmodule

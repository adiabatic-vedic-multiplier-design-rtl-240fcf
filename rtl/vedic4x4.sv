// 4x4 Urdhva Tiryakbhyam multiplier in ordinary logic: four AND/XOR 2x2
// multipliers and three 4-bit Chinese abacus adders (B/A, P/A, T/B phases).
//
//   p = a * b,  a and b 4 bits, p 8 bits (S7..S0)
//
// The arrangement is the same as in the reversible version (vedic4x4_rev):
//   p = HH<<4 + (HL + LH)<<2 + LL
//   Adder 1: HL + LH                   -> m, carry ca1
//   Adder 2: m + {00, LL[3:2]}         -> t, carry ca2; p[3:2] = t[1:0]
//   Adder 3: HH + {0, ca1|ca2, t[3:2]} -> p[7:4], carry ca3
// ca1 and ca2 are never both 1, so an OR joins them on weight 64.  ca3 is 0
// for all 4-bit operands and is kept as an output.  The block arrangement
// follows the reference block diagram; the join of ca1 and ca2 is this
// implementation's.  It is the variant without reversible gates, against
// which the reversible one is compared.  Combinational.
module vedic4x4
  import abacus_pkg::*;
(
  input  nibble_t  a,
  input  nibble_t  b,
  output product_t p,
  output logic     ca3
);

  nibble_t pp_hh, pp_hl, pp_lh, pp_ll;
  nibble_t m, t, s_hi;
  logic    ca1, ca2;

  ut2x2 u_mul_hh (.a(a[3:2]), .b(b[3:2]), .q(pp_hh));
  ut2x2 u_mul_hl (.a(a[3:2]), .b(b[1:0]), .q(pp_hl));
  ut2x2 u_mul_lh (.a(a[1:0]), .b(b[3:2]), .q(pp_lh));
  ut2x2 u_mul_ll (.a(a[1:0]), .b(b[1:0]), .q(pp_ll));

  abacus_adder4 u_add1 (.a(pp_hl), .b(pp_lh), .cin(1'b0), .s(m), .cout(ca1));
  abacus_adder4 u_add2 (.a(m), .b({2'b00, pp_ll[3:2]}), .cin(1'b0), .s(t), .cout(ca2));
  abacus_adder4 u_add3 (.a(pp_hh), .b({1'b0, ca1 | ca2, t[3:2]}), .cin(1'b0),
                        .s(s_hi), .cout(ca3));

  assign p = {s_hi, t[1:0], pp_ll[1:0]};

endmodule

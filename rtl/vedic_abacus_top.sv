// Top level: the 4x4 Urdhva Tiryakbhyam multiplier with Chinese abacus
// adders, in both forms side by side.
//
//   p_rev  = a_rev  * b_rev    reversible-gate form (Peres/Feynman 2x2
//                              multipliers, NFT/F2G adders): the main design
//   p_conv = a_conv * b_conv   ordinary-logic form (AND/XOR 2x2 multipliers,
//                              radix-4 abacus adders with B/A, P/A, T/B)
//
// Each form has its own operands and its own product, plus the carry out of
// its last adder (always 0 for 4-bit operands).  Everything is
// combinational: a product is valid one propagation delay after its
// operands settle; there is no clock and no reset.
module vedic_abacus_top
  import abacus_pkg::*;
(
  input  nibble_t  a_rev,
  input  nibble_t  b_rev,
  output product_t p_rev,
  output logic     ca3_rev,
  input  nibble_t  a_conv,
  input  nibble_t  b_conv,
  output product_t p_conv,
  output logic     ca3_conv
);

  vedic4x4_rev u_mult_rev (.a(a_rev), .b(b_rev), .p(p_rev), .ca3(ca3_rev));

  vedic4x4 u_mult_conv (.a(a_conv), .b(b_conv), .p(p_conv), .ca3(ca3_conv));

endmodule

// 4-bit Chinese abacus adder (radix 4, one hexadecimal column).
//
//   {cout, s} = a + b + cin
//
// How it works, in three phases:
//   1. B/A: each operand becomes one abacus column, three upper beads of
//      weight 4 and three lower beads of weight 1 (thermometer codes).
//   2. P/A: the upper beads of both operands are merged onto one rod and
//      the lower beads onto another, both in parallel (0..6 beads each).
//   3. T/B: the lower rod, with cin, gives sum bits 1..0 and a carry of
//      weight 4; that carry goes into the upper rod, which gives sum bits
//      3..2 and cout.
// Only two carries ripple: from the lower to the upper rod and out of the
// column.  The phases and their connection are the reference design's.
// Combinational.
module abacus_adder4
  import abacus_pkg::*;
(
  input  nibble_t a,
  input  nibble_t b,
  input  logic    cin,
  output nibble_t s,
  output logic    cout
);

  therm3_t h_a, l_a, h_b, l_b;
  therm6_t k_hi, k_lo;
  logic    c_mid;   // carry from the lower rod to the upper rod

  abacus_b2a u_b2a_a (.d(a), .h(h_a), .l(l_a));
  abacus_b2a u_b2a_b (.d(b), .h(h_b), .l(l_b));

  abacus_pa  u_pa_hi (.x(h_a), .y(h_b), .k(k_hi));
  abacus_pa  u_pa_lo (.x(l_a), .y(l_b), .k(k_lo));

  abacus_t2b u_t2b_lo (.k(k_lo), .cin(cin),   .d(s[1:0]), .cout(c_mid));
  abacus_t2b u_t2b_hi (.k(k_hi), .cin(c_mid), .d(s[3:2]), .cout(cout));

endmodule

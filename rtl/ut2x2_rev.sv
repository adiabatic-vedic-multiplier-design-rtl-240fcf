// Reversible 2x2 Urdhva Tiryakbhyam (vertically and crosswise) multiplier:
// five Peres gates and one Feynman gate.
//
//   q = a * b,  a and b 2 bits, q 4 bits
//   q0 = a0.b0
//   q1 = a1.b0 ^ a0.b1
//   q2 = a0.a1.b0.b1 ^ a1.b1
//   q3 = a0.a1.b0.b1
//
// How it works: three Peres gates with c = 0 form the partial products
// a0.b0, a1.b1 and a1.b0.  A fourth Peres gate XORs a0.b1 into a1.b0, giving
// q1 (the crosswise sum).  A fifth Peres gate takes a0.b0 and a1.b1: its
// pass-through output is q0 and its AND output is a0.a1.b0.b1, which is q3.
// A Feynman gate then XORs q3 into a1.b1 to give q2.  Gates and connections
// follow the reference gate-level drawing; a1.b1 feeds two gates (a fan-out),
// as it does there.  Garbage outputs stay internal.  Combinational.
module ut2x2_rev (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic p00, p11, p10;                 // partial products a0b0, a1b1, a1b0
  logic g0p, g0q, g1p, g1q, g2p, g2q;  // garbage of the product gates
  logic g3p, g3q;                      // garbage of the crosswise gate
  logic g4q;                           // garbage of the q0/q3 gate
  logic q0_w, q3_w, q2_w, q3_fg;

  // Partial products (c tied to 0 makes r = a & b).
  gate_peres u_pg_a0b0 (.a(a[0]), .b(b[0]), .c(1'b0), .p(g0p), .q(g0q), .r(p00));
  gate_peres u_pg_a1b1 (.a(a[1]), .b(b[1]), .c(1'b0), .p(g1p), .q(g1q), .r(p11));
  gate_peres u_pg_a1b0 (.a(a[1]), .b(b[0]), .c(1'b0), .p(g2p), .q(g2q), .r(p10));

  // Crosswise sum: q1 = a0.b1 ^ a1.b0.
  gate_peres u_pg_cross (.a(a[0]), .b(b[1]), .c(p10), .p(g3p), .q(g3q), .r(q[1]));

  // a0.b0 passes through as q0; a0b0 & a1b1 = q3.
  gate_peres u_pg_high (.a(p00), .b(p11), .c(1'b0), .p(q0_w), .q(g4q), .r(q3_w));

  // q2 = q3 ^ a1.b1, q3 passes through.
  gate_fg u_fg_q2 (.a(q3_w), .b(p11), .p(q3_fg), .q(q2_w));

  assign q[0] = q0_w;
  assign q[2] = q2_w;
  assign q[3] = q3_fg;

endmodule

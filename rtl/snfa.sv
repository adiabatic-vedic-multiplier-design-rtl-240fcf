// Single NFT full adder (SNFA): a reversible one-bit full adder made of one
// NFT gate and three Feynman double (F2G) gates.
//
//   s    = a ^ b ^ cin
//   cout = a&b | a&cin | b&cin
//
// How it works: the first F2G forms a^b and keeps a copy of a; the second
// F2G copies cin twice (reversible gates may not fan out); the third F2G
// XORs a^b with cin into the sum and passes a^b on.  The NFT gate receives
// (a, cin, a^b); its r output is a multiplexer steered by a^b, which gives
// a when a == b (then a == b == carry) and cin otherwise: that is the carry.
//
// The gate mix (one NFT, three F2G) is the design's; the way the four gates
// are wired is this implementation's own, since only the mix is specified.
// This wiring leaves five garbage outputs, where the reference design counts
// three; they are kept as internal nets and left unused.  Combinational.
module snfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic a_copy, a_xor_b, g_a;         // F2G #1: a fan-out and a^b
  logic cin_0, cin_1, g_cin;          // F2G #2: cin fan-out
  logic axb_copy, g_axb;              // F2G #3: sum
  logic g_nft_p, g_nft_q;             // NFT garbage outputs

  gate_f2g u_f2g_ab (
    .a(a), .b(b), .c(1'b0),
    .p(a_copy), .q(a_xor_b), .r(g_a)
  );

  gate_f2g u_f2g_cin (
    .a(cin), .b(1'b0), .c(1'b0),
    .p(cin_0), .q(cin_1), .r(g_cin)
  );

  gate_f2g u_f2g_sum (
    .a(a_xor_b), .b(cin_0), .c(1'b0),
    .p(axb_copy), .q(s), .r(g_axb)
  );

  gate_nft u_nft_carry (
    .a(a_copy), .b(cin_1), .c(axb_copy),
    .p(g_nft_p), .q(g_nft_q), .r(cout)
  );

endmodule

// Reversible abacus adder: NIBBLES 4-bit NFT/F2G adders in a chain, the
// carry out of one 4-bit column feeding the carry in of the next.
//
//   {cout, s} = a + b + cin,   all operands 4*NIBBLES bits wide
//
// The default of four columns (16 bits) is the chain of four 4-bit NFT/F2G
// adders of the reference drawing; the 4x4 multiplier uses one column
// (NIBBLES = 1), that is three 4-bit adders per multiplier.  Inside each
// column the carry ripples through four single-NFT full adders.
// Combinational: the delay grows with 4*NIBBLES full-adder carries.
module rev_abacus_adder #(
  parameter int unsigned NIBBLES = 4
) (
  input  logic [4*NIBBLES-1:0] a,
  input  logic [4*NIBBLES-1:0] b,
  input  logic                 cin,
  output logic [4*NIBBLES-1:0] s,
  output logic                 cout
);

  logic [NIBBLES:0] c;

  assign c[0] = cin;

  for (genvar n = 0; n < NIBBLES; n++) begin : g_col
    nft_f2g_adder4 u_col (
      .a   (a[4*n +: 4]),
      .b   (b[4*n +: 4]),
      .cin (c[n]),
      .s   (s[4*n +: 4]),
      .cout(c[n+1])
    );
  end

  assign cout = c[NIBBLES];

endmodule

// 4-bit NFT/F2G adder: four single-NFT full adders (SNFA) in a ripple chain.
//
//   {cout, s} = a + b + cin
//
// It is the unit that the reversible abacus adder chains (one unit per
// 4-bit column).  Bit 0 is the least significant; the carry ripples from
// bit 0 to bit 3.  Combinational.
module nft_f2g_adder4
  import abacus_pkg::*;
(
  input  nibble_t a,
  input  nibble_t b,
  input  logic    cin,
  output nibble_t s,
  output logic    cout
);

  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    snfa u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .s(s[i]), .cout(c[i+1])
    );
  end

  assign cout = c[4];

endmodule

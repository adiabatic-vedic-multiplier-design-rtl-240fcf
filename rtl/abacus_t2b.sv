// T/B (thermometric to binary) module: last phase of the 4-bit Chinese
// abacus adder.  It turns the bead count of one merged rod, plus an incoming
// carry, into a radix-4 digit and an outgoing carry.
//
//   n    = count(k) + cin         (0..7)
//   d    = n mod 4                (the two output bits, B3..B2 or B1..B0)
//   cout = (n >= 4)
//
// How it works: "n >= m" is k[m-1] | (cin & k[m-2]), with k[-1] taken as 1;
// the carry is "n >= 4", d[1] is "2 <= n < 4 or n >= 6" and d[0] marks the
// odd counts.  Inputs, outputs and the carry chaining between the lower and
// the upper rod are the reference design's; the decoding logic is this
// implementation's.  Combinational.
module abacus_t2b
  import abacus_pkg::*;
(
  input  therm6_t    k,
  input  logic       cin,
  output logic [1:0] d,
  output logic       cout
);

  logic [7:0] ge;  // ge[m] = (n >= m)

  always_comb begin
    ge[0] = 1'b1;
    ge[1] = k[0] | cin;
    for (int m = 2; m <= 6; m++) ge[m] = k[m-1] | (cin & k[m-2]);
    ge[7] = cin & k[5];

    cout = ge[4];
    d[1] = (ge[2] & ~ge[4]) | ge[6];
    d[0] = (ge[1] & ~ge[2]) | (ge[3] & ~ge[4]) | (ge[5] & ~ge[6]) | ge[7];
  end

endmodule

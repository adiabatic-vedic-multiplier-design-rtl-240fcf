// Peres gate (PRG): a 3-input, 3-output reversible gate.
//
//   p = a
//   q = a ^ b
//   r = (a & b) ^ c
//
// Quantum cost 4.  With c tied to 0, r is the AND of a and b; with c used,
// r is a partial product XORed into a running value.  The 2x2 multiplier of
// this design is built almost entirely from this gate.  Combinational.
//
// The output equations and quantum cost are the standard ones of this gate,
// as the reference design uses them; the port names are this design's.
module gate_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule

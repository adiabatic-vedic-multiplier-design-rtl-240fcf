// Feynman double gate (F2G): a 3-input, 3-output reversible gate.
//
//   p = a
//   q = a ^ b
//   r = a ^ c
//
// Quantum cost 2.  With b and c tied to 0 it makes two copies of a; with b
// used it forms an XOR while keeping a copy.  Combinational.
//
// The output equations and quantum cost are the standard ones of this gate,
// as the reference design uses them; the port names are this design's.
module gate_f2g (
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
    r = a ^ c;
  end

endmodule

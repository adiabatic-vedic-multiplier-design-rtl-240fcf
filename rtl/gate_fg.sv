// Feynman gate (FG), also called controlled-NOT: a 2-input, 2-output
// reversible gate.
//
//   p = a          (control passes through)
//   q = a ^ b      (target is inverted when the control is 1)
//
// Quantum cost 1.  With b tied to 0 it copies a, which is how reversible
// circuits make a fan-out.  Purely combinational, no clock.
//
// The output equations and quantum cost are the standard ones of this gate,
// as the reference design uses them; the port names are this design's.
module gate_fg (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule

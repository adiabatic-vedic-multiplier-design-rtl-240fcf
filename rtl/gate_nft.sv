// New Fault Tolerant gate (NFT): a 3-input, 3-output reversible gate.
//
//   p = a ^ b
//   q = (a & ~c) ^ (~b & c)
//   r = (a & ~c) ^ (b & c)
//
// Quantum cost 5.  Output r is a 2:1 multiplexer steered by c (a when c is 0,
// b when c is 1); the full adder of this design takes its carry from it.
// Combinational.
//
// The output equations and quantum cost are the standard ones of this gate,
// as the reference design uses them; the port names are this design's.
module gate_nft (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a ^ b;
    q = (a & ~c) ^ (~b & c);
    r = (a & ~c) ^ (b & c);
  end

endmodule

// 2x2 Urdhva Tiryakbhyam (vertically and crosswise) multiplier in ordinary
// AND/XOR logic.
//
//   q0 = a0.b0                    (vertical, low)
//   q1 = a1.b0 ^ a0.b1            (crosswise)
//   q2 = a0.a1.b0.b1 ^ a1.b1      (vertical, high, plus crosswise carry)
//   q3 = a0.a1.b0.b1              (carry out)
//
// The four equations are the reference design's.  Combinational.
module ut2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic cross_carry;   // (a1.b0) & (a0.b1)

  always_comb begin
    cross_carry = (a[1] & b[0]) & (a[0] & b[1]);
    q[0] = a[0] & b[0];
    q[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    q[2] = cross_carry ^ (a[1] & b[1]);
    q[3] = cross_carry & (a[1] & b[1]);
  end

endmodule

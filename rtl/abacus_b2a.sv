// B/A (binary to abacus) module: first phase of the 4-bit Chinese abacus
// adder.  It sets the beads of one abacus column for a 4-bit binary number.
//
//   d = 4*H + L,   H = d[3:2] beads on the upper rod (weight 4 each)
//                  L = d[1:0] beads on the lower rod (weight 1 each)
//
// Each rod is a 3-bit thermometer code (abacus_pkg::therm3_t): bit i is set
// when at least i+1 beads are pushed.  For 9 = 4*2 + 1 the outputs are
// h = 3'b011 (H0 = H1 = 1, H2 = 0) and l = 3'b001 (L0 = 1).  The rod
// layout follows the reference coding; the logic for the two-bit to
// thermometer step is the obvious one.  Combinational.
module abacus_b2a
  import abacus_pkg::*;
(
  input  nibble_t d,
  output therm3_t h,   // upper rod H2..H0
  output therm3_t l    // lower rod L2..L0
);

  function automatic therm3_t to_therm(input logic [1:0] v);
    return {v[1] & v[0], v[1], v[1] | v[0]};
  endfunction

  always_comb begin
    h = to_therm(d[3:2]);
    l = to_therm(d[1:0]);
  end

endmodule

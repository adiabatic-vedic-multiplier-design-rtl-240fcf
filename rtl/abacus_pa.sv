// P/A (parallel addition) module: second phase of the 4-bit Chinese abacus
// adder.  It slides the beads of two rods onto one rod in a single step.
//
//   k = x + y   (bead counts), x and y 3-bit thermometer codes (0..3),
//               k a 6-bit thermometer code K5..K0 (0..6)
//
// How it works: k[i] means "at least i+1 beads in all".  That holds when,
// for some j, x holds at least j beads and y at least i+1-j.  Every k[i] is
// an OR of such AND terms, all evaluated at once, so no carry travels
// between bead positions; that is what makes the addition parallel.  The
// phase and its thermometer input/output are the reference design's; the
// AND-OR form is this implementation's.  Combinational.
module abacus_pa
  import abacus_pkg::*;
(
  input  therm3_t x,
  input  therm3_t y,
  output therm6_t k
);

  // "at least n beads" for a 3-bead rod; n <= 0 is always true.
  function automatic logic at_least(input therm3_t t, input int n);
    if (n <= 0)      return 1'b1;
    else if (n > 3)  return 1'b0;
    else             return t[n-1];
  endfunction

  always_comb begin
    for (int i = 0; i < 6; i++) begin
      k[i] = 1'b0;
      for (int j = 0; j <= 3; j++) begin
        k[i] = k[i] | (at_least(x, j) & at_least(y, i + 1 - j));
      end
    end
  end

endmodule

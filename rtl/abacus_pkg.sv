// Shared types of the 4x4 Urdhva Tiryakbhyam multiplier and its Chinese
// abacus adders.
//
// An abacus column of this design holds two rods of three beads each: an
// upper rod whose beads weigh four and a lower rod whose beads weigh one, so
// that one column shows 0..15 (one hexadecimal digit, i.e. one nibble).
// Each rod is carried as a thermometer code: bit i is 1 when at least i+1
// beads are pushed to the middle bar.  Adding two rods gives up to six beads,
// carried as a six-bit thermometer code.  Bead weights and counts follow the
// abacus coding of the design; the thermometer bit order (bit 0 = bead next
// to the bar) is this implementation's choice.
package abacus_pkg;

  // One rod of three beads: 3'b000 = 0 beads ... 3'b111 = 3 beads.
  typedef logic [2:0] therm3_t;

  // Two rods merged: 6'b000000 = 0 beads ... 6'b111111 = 6 beads.
  typedef logic [5:0] therm6_t;

  typedef logic [3:0] nibble_t;   // one 4-bit operand / one abacus column
  typedef logic [7:0] product_t;  // 4x4 product

endpackage

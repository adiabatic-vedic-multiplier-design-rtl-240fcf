// End-to-end testbench for vedic_abacus_top at its default parameters.
// Both multipliers run at the same time on different operands: the
// reversible one walks through all 256 pairs (a, b) while the ordinary one
// gets the pairs in another order (a ^ 4'h5, b reversed), so that every
// pair is also seen by it.  Each product is compared with the integer
// product and each ca3 must stay 0.
//
// Mechanisms counted, each of which must happen at least once:
//   - carry out of adder 1 (ca1) and of adder 2 (ca2) in both multipliers;
//   - the lower-to-upper rod carry inside the abacus adders of the ordinary
//     multiplier;
//   - a carry rippling through a whole 4-bit NFT/F2G adder (carry in of its
//     top bit set) in the reversible multiplier.
module tb_vedic_abacus_top;
  import abacus_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_ca1_rev = 0, n_ca2_rev = 0, n_ca1_conv = 0, n_ca2_conv = 0;
  int n_rod_carry = 0, n_ripple3 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  nibble_t  a_rev, b_rev, a_conv, b_conv;
  product_t p_rev, p_conv;
  logic     ca3_rev, ca3_conv;

  vedic_abacus_top dut (
    .a_rev(a_rev), .b_rev(b_rev), .p_rev(p_rev), .ca3_rev(ca3_rev),
    .a_conv(a_conv), .b_conv(b_conv), .p_conv(p_conv), .ca3_conv(ca3_conv)
  );

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic nibble_t rev4(input nibble_t v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  initial begin : stimulus
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a_rev  = nibble_t'(i);
        b_rev  = nibble_t'(j);
        a_conv = nibble_t'(i) ^ 4'h5;
        b_conv = rev4(nibble_t'(j));
        @(posedge clk);
        #1;
        checks++;
        if (int'(p_rev) != i * j || ca3_rev !== 1'b0) begin
          failures++;
          $display("FAIL reversible %0d x %0d: p=%0d ca3=%b", i, j, p_rev, ca3_rev);
        end
        checks++;
        if (int'(p_conv) != int'(a_conv) * int'(b_conv) || ca3_conv !== 1'b0) begin
          failures++;
          $display("FAIL ordinary %0d x %0d: p=%0d ca3=%b", a_conv, b_conv, p_conv, ca3_conv);
        end
        if (dut.u_mult_rev.ca1)  n_ca1_rev++;
        if (dut.u_mult_rev.ca2)  n_ca2_rev++;
        if (dut.u_mult_conv.ca1) n_ca1_conv++;
        if (dut.u_mult_conv.ca2) n_ca2_conv++;
        if (dut.u_mult_conv.u_add1.c_mid || dut.u_mult_conv.u_add2.c_mid ||
            dut.u_mult_conv.u_add3.c_mid) n_rod_carry++;
        if (dut.u_mult_rev.u_add1.g_col[0].u_col.c[3] ||
            dut.u_mult_rev.u_add2.g_col[0].u_col.c[3]) n_ripple3++;
      end
    end
    $display("reversible: ca1 %0d, ca2 %0d, carries into bit 3 %0d", n_ca1_rev, n_ca2_rev, n_ripple3);
    $display("ordinary:   ca1 %0d, ca2 %0d, rod carries %0d", n_ca1_conv, n_ca2_conv, n_rod_carry);
    checks++;
    if (n_ca1_rev == 0 || n_ca2_rev == 0 || n_ca1_conv == 0 || n_ca2_conv == 0 ||
        n_rod_carry == 0 || n_ripple3 == 0) begin
      failures++;
      $display("FAIL a counted mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

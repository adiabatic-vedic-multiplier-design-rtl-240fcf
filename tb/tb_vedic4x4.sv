// Self-checking testbench for vedic4x4, the 4x4 multiplier in ordinary logic with abacus adders.
// All 256 operand pairs are applied; p must equal the integer product and
// the last adder's carry ca3 must stay 0.  It counts how often the first
// adder (ca1) and the second adder (ca2) carried, and fails if either never
// did or if both carried at once.
module tb_vedic4x4;
  import abacus_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_ca1 = 0;
  int n_ca2 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  nibble_t  a, b;
  product_t p;
  logic     ca3;

  vedic4x4 dut (.a(a), .b(b), .p(p), .ca3(ca3));

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = nibble_t'(i); b = nibble_t'(j);
        @(posedge clk);
        #1;
        checks++;
        if (int'(p) != i * j || ca3 !== 1'b0) begin
          failures++;
          $display("FAIL %0d x %0d: got p=%0d ca3=%b", i, j, p, ca3);
        end
        if (dut.ca1) n_ca1++;
        if (dut.ca2) n_ca2++;
        checks++;
        if (dut.ca1 && dut.ca2) begin
          failures++;
          $display("FAIL %0d x %0d: ca1 and ca2 both set", i, j);
        end
      end
    end
    checks++;
    if (n_ca1 == 0 || n_ca2 == 0) begin
      failures++;
      $display("FAIL adder carries not exercised");
    end
    $display("ca1 carries %0d, ca2 carries %0d", n_ca1, n_ca2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for abacus_b2a, the binary-to-abacus phase.
// For all sixteen 4-bit values it checks that the upper rod shows d / 4
// beads and the lower rod d % 4 beads, each as a gap-free thermometer code
// (bead count = number of ones, and ones only at the low end).  It also
// checks the worked example 9 -> upper 3'b011, lower 3'b001.
module tb_abacus_b2a;
  import abacus_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  nibble_t d;
  therm3_t h, l;

  abacus_b2a dut (.d(d), .h(h), .l(l));

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic therm3_t therm(input int n);
    return therm3_t'((1 << n) - 1);
  endfunction

  initial begin : stimulus
    for (int v = 0; v < 16; v++) begin
      d = nibble_t'(v);
      @(posedge clk);
      #1;
      checks++;
      if (h != therm(v / 4) || l != therm(v % 4)) begin
        failures++;
        $display("FAIL d=%0d: h=%b l=%b", v, h, l);
      end
      if (v == 9) begin
        checks++;
        if (h != 3'b011 || l != 3'b001) begin
          failures++;
          $display("FAIL worked example 9: h=%b l=%b", h, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for abacus_pa, the parallel bead addition.
// For every pair of bead counts 0..3 it checks that the six-bead rod holds
// exactly x + y beads as a gap-free thermometer code.
module tb_abacus_pa;
  import abacus_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  therm3_t x, y;
  therm6_t k;

  abacus_pa dut (.x(x), .y(y), .k(k));

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i <= 3; i++) begin
      for (int j = 0; j <= 3; j++) begin
        x = therm3_t'((1 << i) - 1);
        y = therm3_t'((1 << j) - 1);
        @(posedge clk);
        #1;
        checks++;
        if (k != therm6_t'((1 << (i + j)) - 1)) begin
          failures++;
          $display("FAIL %0d + %0d beads: k=%b", i, j, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

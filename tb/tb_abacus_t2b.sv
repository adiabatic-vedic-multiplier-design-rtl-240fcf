// Self-checking testbench for abacus_t2b, the thermometer-to-binary phase.
// For every bead count 0..6 and both values of the carry in, it checks that
// d = (count + cin) mod 4 and cout = (count + cin) >= 4.
module tb_abacus_t2b;
  import abacus_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  therm6_t    k;
  logic       cin, cout;
  logic [1:0] d;

  abacus_t2b dut (.k(k), .cin(cin), .d(d), .cout(cout));

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int n;
    for (int c = 0; c <= 6; c++) begin
      for (int ci = 0; ci <= 1; ci++) begin
        k = therm6_t'((1 << c) - 1);
        cin = 1'(ci);
        @(posedge clk);
        #1;
        n = c + ci;
        checks++;
        if (int'(d) != n % 4 || cout != (n >= 4)) begin
          failures++;
          $display("FAIL %0d beads + cin %0d: d=%0d cout=%b", c, ci, d, cout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

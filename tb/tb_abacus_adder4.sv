// Self-checking testbench for abacus_adder4, the 4-bit radix-4 Chinese
// abacus adder.  All 512 combinations of a, b and cin are applied and
// {cout, s} is compared with the integer sum.  It also counts how often the
// lower rod carried into the upper rod and how often the column carried
// out, and fails if either never happened.
module tb_abacus_adder4;
  import abacus_pkg::*;
  int checks = 0;
  int failures = 0;
  int mid_carries = 0;
  int out_carries = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  nibble_t a, b, s;
  logic    cin, cout;

  abacus_adder4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    repeat (700) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int sum;
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      @(posedge clk);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} != 5'(sum)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d: got %0d", a, b, cin, {cout, s});
      end
      if (int'(a[1:0]) + int'(b[1:0]) + int'(cin) >= 4) mid_carries++;
      if (cout) out_carries++;
    end
    checks++;
    if (mid_carries == 0 || out_carries == 0) begin
      failures++;
      $display("FAIL carries never exercised");
    end
    $display("lower-to-upper carries %0d, carries out %0d", mid_carries, out_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

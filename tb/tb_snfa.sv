// Self-checking testbench for snfa, the reversible one-bit full adder.
// All eight input combinations are applied; {cout, s} must equal the
// integer sum a + b + cin.  A clock paces the stimulus and the watchdog.
module tb_snfa;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, cin, s, cout;

  snfa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int sum;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = v[2:0];
      @(posedge clk);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} != 2'(sum)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: got cout=%b s=%b, expected %0d", a, b, cin, cout, s, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

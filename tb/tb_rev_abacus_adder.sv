// Self-checking testbench for rev_abacus_adder at its default width of four
// 4-bit columns (16 bits).  It applies corner cases (zero, all ones, a carry
// that ripples through every column) and then random operands, and compares
// {cout, s} with a + b + cin computed in 32-bit integer arithmetic.  It also
// counts how many vectors carried out of the top column and fails if none
// did.  A clock paces the stimulus and the watchdog.
module tb_rev_abacus_adder;
  localparam int unsigned NIBBLES = 4;
  localparam int unsigned W = 4 * NIBBLES;
  localparam int unsigned NRAND = 3000;

  int checks = 0;
  int failures = 0;
  int carries_out = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, s;
  logic         cin, cout;

  rev_abacus_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    repeat (NRAND + 100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    longint unsigned expected;
    a = ta; b = tb_; cin = tc;
    @(posedge clk);
    #1;
    expected = longint'(ta) + longint'(tb_) + longint'(tc);
    checks++;
    if ({cout, s} != (W+1)'(expected)) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h, expected %h", ta, tb_, tc, cout, s, expected);
    end
    if (cout) carries_out++;
  endtask

  initial begin : stimulus
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);          // carry ripples through every bit
    apply('1, '1, 1'b1);
    apply(W'(16'h8421), W'(16'h7bde), 1'b1);
    for (int i = 0; i < int'(NRAND); i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    checks++;
    if (carries_out == 0) begin
      failures++;
      $display("FAIL no vector carried out of the top column");
    end
    $display("carry out seen %0d times", carries_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

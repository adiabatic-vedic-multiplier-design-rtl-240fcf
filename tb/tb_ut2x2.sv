// Self-checking testbench for ut2x2, the 2x2 multiplier in AND/XOR logic.
// All sixteen operand pairs are applied; q must equal the integer product.
module tb_ut2x2;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a, b;
  logic [3:0] q;

  ut2x2 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        #1;
        checks++;
        if (int'(q) != i * j) begin
          failures++;
          $display("FAIL %0d x %0d: got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

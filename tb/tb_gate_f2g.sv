// Self-checking testbench for gate_f2g: Feynman double gate, p = a, q = a ^ b, r = a ^ c.
// It applies every input combination, compares the outputs with the gate's
// defining equations written out here, and also checks that no two input
// combinations give the same output word (the gate is reversible, so its
// mapping must be one to one).  A clock only paces the stimulus and the
// watchdog.
module tb_gate_f2g;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a;
  logic b;
  logic c;
  logic p;
  logic q;
  logic r;

  gate_f2g dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] seen;
    logic [2:0] exp_out;
    logic [2:0] got;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      @(posedge clk);
      #1;
      exp_out = {a, a ^ b, a ^ c};
      got = {p, q, r};
      checks++;
      if (got !== exp_out) begin
        failures++;
        $display("FAIL in=%b got=%b expected=%b", v[2:0], got, exp_out);
      end
      checks++;
      if (seen[got]) begin
        failures++;
        $display("FAIL output %b produced twice: not one to one", got);
      end
      seen[got] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync2: self-checking test of the two-flip-flop synchronizer: reset value
// for both RESET_VAL settings and a latency of exactly two clock edges for
// random input changes.
module tb_sync2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic d = 1'b0, q0, q1;

  sync2 #(.RESET_VAL(1'b0)) dut0 (.clk, .rst_n, .d, .q(q0));
  sync2 #(.RESET_VAL(1'b1)) dut1 (.clk, .rst_n, .d, .q(q1));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] hist;
  initial begin
    #1;
    check(q0 == 1'b0 && q1 == 1'b1, "reset values");
    @(negedge clk) rst_n = 1'b1;
    hist = 2'b00;
    d = 1'b1;
    @(negedge clk);
    check(q0 == 1'b0, "not through after one edge");
    @(negedge clk);
    check(q0 == 1'b1 && q1 == 1'b1, "through after two edges");
    for (int i = 0; i < 100; i++) begin
      hist = {hist[0], d};
      d = 1'($urandom);
      @(negedge clk);
      check(q0 == hist[0] && q1 == hist[0], $sformatf("step %0d: two-cycle latency", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

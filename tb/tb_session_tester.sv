// tb_session_tester: self-checking test of the session test-phase block
// against a testbench scan path of programmable length n (random initial
// contents). For random longest length L and expected length l the block must
// pass when n == l, fail when n != l (path one bit too short or too long, or a
// stuck TDO), and take exactly L + l + 2 shift cycles.
module tb_session_tester;
  localparam int LW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, shift_en, tdi, tdo, busy, done, pass;
  logic [LW-1:0] long_len, path_len;
  logic [LW:0] cycles;
  logic [63:0] path;
  int n = 1;
  logic stuck = 1'b0;

  session_tester #(.LW(LW)) dut (.clk, .rst_n, .start, .long_len, .path_len,
    .shift_en, .tdi, .tdo, .busy, .done, .pass, .cycles);

  int shifts = 0;
  always_ff @(posedge clk) if (shift_en) begin path <= {path[62:0], tdi}; shifts <= shifts + 1; end
  assign tdo = stuck | path[n-1];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ll, input int l, input int actual, input bit expect_pass);
    path = {$urandom, $urandom};
    n = actual;
    long_len = LW'(ll);
    path_len = LW'(l);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    shifts = 0;
    while (!done) @(negedge clk);
    check(pass == expect_pass, $sformatf("L=%0d l=%0d n=%0d pass=%0b", ll, l, actual, pass));
    check(int'(cycles) == ll + l + 2, $sformatf("cycles %0d expected %0d", cycles, ll + l + 2));
    check(shifts == ll + l + 2, $sformatf("shift edges %0d expected %0d", shifts, ll + l + 2));
  endtask

  initial begin
    int ll, l;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // the example of the document: L = 9, l = 5 and l = 6
    run(9, 5, 5, 1'b1);
    run(9, 6, 6, 1'b1);
    run(9, 5, 6, 1'b0);
    run(9, 6, 2, 1'b0);
    for (int k = 0; k < 20; k++) begin
      l  = 1 + ($urandom % 40);
      ll = l + ($urandom % 20);
      run(ll, l, l, 1'b1);
      run(ll, l, (l > 1 && k[0]) ? l - 1 : l + 1, 1'b0);
    end
    stuck = 1'b1;
    run(9, 5, 5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sib: self-checking test of the standard SIB with a 3-bit child segment
// modelled in the testbench (shifted only while child_sel is high). Checks the
// path length when closed (1) and open (4), that capture reads back the
// update cell, that the child data passes the SIB unchanged, and that nothing
// happens while sel is low.
module tb_sib;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sel = 1'b1, cap = 1'b0, sh = 1'b0, upd = 1'b0, si = 1'b0;
  logic so, tsi, fso, child_sel, asserted;
  logic [2:0] seg = '0;

  sib dut (.clk, .rst_n, .sel, .capture_en(cap), .shift_en(sh), .update_en(upd),
           .si, .so, .tsi, .fso, .child_sel, .asserted);

  assign fso = seg[0];
  always_ff @(posedge clk) if (child_sel && sh) seg <= {tsi, seg[2:1]};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flush with zeros, then shift one 1 and count edges until it reaches so
  task automatic path_len(output int n);
    sh = 1'b1; si = 1'b0;
    repeat (8) @(negedge clk);
    si = 1'b1;
    n = 0;
    do begin @(negedge clk); si = 1'b0; n++; end while (!so && n < 20);
    sh = 1'b0;
  endtask

  task automatic prog(input logic v);
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1; si = v;
    @(negedge clk) sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
  endtask

  int n;
  logic [7:0] pat, got;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(!asserted && !child_sel, "reset de-asserted");
    path_len(n);
    check(n == 1, $sformatf("closed path length %0d expected 1", n));
    prog(1'b1);
    check(asserted && child_sel, "asserted after update");
    path_len(n);
    check(n == 4, $sformatf("open path length %0d expected 4", n));
    // capture reads the update cell
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0;
    check(so == 1'b1, "capture loads asserted state");
    // data passes through the child segment and the SIB cell unchanged
    pat = 8'($urandom);
    sh = 1'b1;
    for (int i = 0; i < 12; i++) begin
      si = (i < 8) ? pat[i] : 1'b0;
      @(negedge clk);
      if (i >= 3 && i < 11) got[i-3] = so;
    end
    sh = 1'b0;
    check(got == pat, $sformatf("pattern %h came out as %h", pat, got));
    prog(1'b0);
    check(!asserted && !child_sel, "de-asserted again");
    path_len(n);
    check(n == 1, $sformatf("closed path length %0d expected 1", n));
    // deselected: no update
    sel = 1'b0;
    prog(1'b1);
    check(!asserted, "no update while deselected");
    sel = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scan_mux_ctrl: self-checking test of the ScanMux with control register
// (N = 4) feeding four testbench segments of lengths 2, 3, 4 and 5. For each
// select value the control register is programmed, then the path length
// (segment + 2 control cells) and seg_sel are checked; capture must read back
// the select value.
module tb_scan_mux_ctrl;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sel = 1'b1, cap = 1'b0, sh = 1'b0, upd = 1'b0, si = 1'b0, so;
  logic [N-1:0] seg_so, seg_sel;
  logic [1:0] select;
  logic [4:0] seg [N];

  scan_mux_ctrl #(.N(N)) dut (.clk, .rst_n, .sel, .capture_en(cap), .shift_en(sh),
    .update_en(upd), .seg_so, .so, .seg_sel, .select);

  for (genvar g = 0; g < N; g++) begin : g_seg
    localparam int SL = g + 2;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) seg[g] <= '0;
      else if (seg_sel[g] && sh) seg[g] <= {si, seg[g][4:1]};
    assign seg_so[g] = seg[g][5-SL];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic path_len(output int n);
    sh = 1'b1; si = 1'b0;
    repeat (10) @(negedge clk);
    si = 1'b1;
    n = 0;
    do begin @(negedge clk); si = 1'b0; n++; end while (!so && n < 20);
    sh = 1'b0;
  endtask

  // program the select value: the control register sits behind the selected
  // segment, so a whole path length (segment + 2) is shifted, bit 0 first
  task automatic prog(input logic [1:0] v);
    int len;
    len = int'(select) + 4;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < len; i++) begin
      si = (i < 2) ? v[i] : 1'b0;
      @(negedge clk);
    end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
  endtask

  int n;
  logic [1:0] v;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(select == 2'd0 && seg_sel == 4'b0001, "reset selects input 0");
    for (int t = 0; t < 8; t++) begin
      v = (t < 4) ? 2'(t) : 2'($urandom);
      prog(v);
      check(select == v, $sformatf("select %0d expected %0d", select, v));
      check(seg_sel == (4'b1 << v), "only the selected segment is enabled");
      path_len(n);
      check(n == int'(v) + 4, $sformatf("sel %0d path length %0d", v, n));
      @(negedge clk) cap = 1'b1;
      @(negedge clk) cap = 1'b0; sh = 1'b1;
      check(so == v[0], "capture bit 0");
      @(negedge clk) sh = 1'b0;
      check(so == v[1], "capture bit 1");
    end
    sel = 1'b0;
    #1;
    check(seg_sel == '0, "no segment enabled while deselected");
    v = ~select;
    prog(v);
    check(select != v, "no update while deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

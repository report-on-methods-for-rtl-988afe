// tb_net_fig30: self-checking test of example network #3 (TDR1 and TDR2 in
// parallel behind a ScanMux, lengths 3 and 4). For both ScanMux positions it
// configures the control register, checks capture (I2 through TDR2, I1 value
// read back through TDR1) and update, and runs the session test phase: L = 5
// zeros, then alternating bits, the first 1 must appear after 4 (TDR1) or 5
// (TDR2) cycles.
module tb_net_fig30;
  localparam int L1 = 3, L2 = 4, LMAX = 1 + L2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, tdi = 1'b0, tdo, cfg;
  logic [L1-1:0] i1;
  logic [L2-1:0] i2 = '0, u2;

  net_fig30 dut (.clk, .rst_n, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .tdi, .tdo, .i1_out(i1), .i2_in(i2), .tdr2_upd(u2), .cfg);

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

  // path from TDO: S, then the selected TDR (bit 0 first)
  task automatic csu(input logic nxt);
    logic [7:0] vin, vexp, out;
    logic [L1-1:0] w1, o1; logic [L2-1:0] w2, o2;
    logic old;
    int len;
    w1 = L1'($urandom); w2 = L2'($urandom); i2 = L2'($urandom);
    o1 = i1; o2 = u2; old = cfg;
    vin = '0; vexp = '0;
    vin[0] = nxt; vexp[0] = cfg;
    if (cfg) begin vin[1 +: L2] = w2; vexp[1 +: L2] = i2; len = 1 + L2; end
    else     begin vin[1 +: L1] = w1; vexp[1 +: L1] = o1; len = 1 + L1; end
    out = '0;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < len; i++) begin out[i] = tdo; tdi = vin[i]; @(negedge clk); end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
    check(out == vexp, $sformatf("sel %b captured %h expected %h", old, out, vexp));
    check(i1 == (!old ? w1 : o1), "TDR1 drives I1 only when selected");
    check(u2 == (old ? w2 : o2), "TDR2 updated only when selected");
    check(cfg == nxt, "ScanMux control updated");
  endtask

  task automatic session(input int l);
    int first = -1;
    sh = 1'b1; tdi = 1'b0;
    repeat (LMAX) @(negedge clk);
    for (int k = 0; k < l + 2; k++) begin
      if (tdo && first < 0) first = k;
      tdi = !k[0];
      @(negedge clk);
    end
    sh = 1'b0;
    check(first == l, $sformatf("sel %b: first 1 after %0d cycles, expected %0d", cfg, first, l));
  endtask

  initial begin
    logic t;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(cfg == 1'b0, "reset selects TDR1");
    for (int k = 0; k < 12; k++) begin
      t = (k < 4) ? 1'(k) : 1'($urandom);
      csu(t);
      csu(t);
      session(t ? 1 + L2 : 1 + L1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

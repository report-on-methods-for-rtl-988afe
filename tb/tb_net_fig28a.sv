// tb_net_fig28a: self-checking test of example network #1 (SIB1[TDR1 3b],
// SIB2[TDR2 4b]) following the session procedure of the document:
// configure SIB1 asserted / SIB2 de-asserted, flush 9 zeros, shift alternating
// 1/0 and expect the first 1 on TDO after 5 cycles; then SIB1 de-asserted /
// SIB2 asserted and expect it after 6 cycles. Also runs the all-closed (2)
// and all-open (9) paths, writes TDR1 (I1 output) and reads TDR2 (I2 input).
module tb_net_fig28a;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, tdi = 1'b0, tdo;
  logic [2:0] i1_out;
  logic [3:0] i2_in = 4'h0, tdr2_upd;
  logic [1:0] cfg;

  net_fig28a dut (.clk, .rst_n, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .tdi, .tdo, .i1_out, .i2_in, .tdr2_upd, .cfg);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // current path, TDO side first: SIB2, [TDR2 b0..b3], SIB1, [TDR1 b0..b2]
  function automatic int cur_len();
    return 2 + (cfg[0] ? 3 : 0) + (cfg[1] ? 4 : 0);
  endfunction

  // one CSU: capture, shift vector v (bit 0 first) of the current path length,
  // update; returns what came out of TDO
  task automatic csu(input logic [15:0] v, output logic [15:0] out);
    int len;
    len = cur_len();
    out = '0;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < len; i++) begin
      out[i] = tdo;
      tdi = v[i];
      @(negedge clk);
    end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
  endtask

  // build a vector for the current path setting SIB1=a1, SIB2=a2, TDR1=d1
  function automatic logic [15:0] vec(input logic a1, input logic a2, input logic [2:0] d1);
    logic [15:0] v;
    int p;
    v = '0; p = 0;
    v[p] = a2; p++;
    if (cfg[1]) p += 4;
    v[p] = a1; p++;
    if (cfg[0]) v[p +: 3] = d1;
    return v;
  endfunction

  // test phase: L zeros, then l+2 alternating bits; first 1 must appear after l
  task automatic session(input int l);
    int first;
    sh = 1'b1;
    tdi = 1'b0;
    repeat (9) @(negedge clk);
    first = -1;
    for (int k = 0; k < l + 2; k++) begin
      if (tdo && first < 0) first = k;
      tdi = !k[0];
      @(negedge clk);
    end
    sh = 1'b0;
    check(first == l, $sformatf("cfg %b: first 1 after %0d cycles, expected %0d", cfg, first, l));
  endtask

  logic [15:0] out;
  logic [2:0] d1;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(cfg == 2'b00, "reset: both SIBs de-asserted");
    session(2);
    // session 1: SIB1 asserted, SIB2 de-asserted -> path length 5
    csu(vec(1'b1, 1'b0, 3'b0), out);
    check(cfg == 2'b01, "SIB1 asserted");
    d1 = 3'($urandom);
    csu(vec(1'b1, 1'b0, d1), out);
    check(i1_out == d1, "TDR1 drives I1");
    session(5);
    // session 2: SIB1 de-asserted, SIB2 asserted -> path length 6
    csu(vec(1'b0, 1'b1, 3'b0), out);
    check(cfg == 2'b10, "SIB2 asserted, SIB1 de-asserted");
    i2_in = 4'($urandom);
    csu(vec(1'b0, 1'b1, 3'b0), out);
    check(out[4:1] == i2_in, $sformatf("TDR2 captured %h expected %h", out[4:1], i2_in));
    session(6);
    // both asserted: the longest path, 9
    csu(vec(1'b1, 1'b1, 3'b0), out);
    check(cfg == 2'b11, "both asserted");
    session(9);
    csu(vec(1'b0, 1'b0, 3'b0), out);
    check(cfg == 2'b00, "both de-asserted");
    session(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

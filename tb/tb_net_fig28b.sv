// tb_net_fig28b: self-checking test of example network #2 (SIB1[TDR1,
// SIB2[TDR2]], SIB3[TDR3], lengths 3, 4, 5). It reaches each of the six
// possible paths (plus the hidden-SIB2 variants) through as many CSUs as the
// hierarchy needs, checks captured data and updates in every CSU, and runs the
// session test phase (L zeros, alternating bits, first 1 after l cycles) on
// each path. It ends with three sessions that between them put every SIB
// into both states.
module tb_net_fig28b;
  localparam int L1 = 3, L2 = 4, L3 = 5;
  localparam int LMAX = 3 + L1 + L2 + L3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, tdi = 1'b0, tdo;
  logic [L1-1:0] i1;
  logic [L2-1:0] i2 = '0, u2;
  logic [L3-1:0] i3 = '0, u3;
  logic [2:0] cfg;

  net_fig28b dut (.clk, .rst_n, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .tdi, .tdo, .i1_out(i1), .i2_in(i2), .i3_in(i3), .tdr2_upd(u2), .tdr3_upd(u3), .cfg);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cur_len(input logic [2:0] c);
    return 3 - (c[0] ? 0 : 1) + (c[2] ? L3 : 0) + (c[0] ? L1 + (c[1] ? L2 : 0) : 0);
  endfunction

  // one CSU; path from TDO: SIB3, [TDR3], SIB1, [SIB2, [TDR2], TDR1]
  task automatic csu(input logic [2:0] nxt);
    logic [31:0] vin, vexp, out;
    logic [L1-1:0] w1; logic [L2-1:0] w2; logic [L3-1:0] w3, o3; logic [L2-1:0] o2; logic [L1-1:0] o1;
    logic [2:0] old;
    int p, len;
    w1 = L1'($urandom); w2 = L2'($urandom); w3 = L3'($urandom);
    i2 = L2'($urandom); i3 = L3'($urandom);
    o1 = i1; o2 = u2; o3 = u3; old = cfg;
    vin = '0; vexp = '0; p = 0;
    vin[p] = nxt[2]; vexp[p] = cfg[2]; p++;
    if (cfg[2]) begin vin[p +: L3] = w3; vexp[p +: L3] = i3; p += L3; end
    vin[p] = nxt[0]; vexp[p] = cfg[0]; p++;
    if (cfg[0]) begin
      vin[p] = nxt[1]; vexp[p] = cfg[1]; p++;
      if (cfg[1]) begin vin[p +: L2] = w2; vexp[p +: L2] = i2; p += L2; end
      vin[p +: L1] = w1; vexp[p +: L1] = o1; p += L1;
    end
    len = p;
    check(len == cur_len(cfg), "path model length");
    out = '0;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < len; i++) begin out[i] = tdo; tdi = vin[i]; @(negedge clk); end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
    check(out == vexp, $sformatf("cfg %b captured %h expected %h", old, out, vexp));
    check(i1 == (old[0] ? w1 : o1), "TDR1 drives I1");
    check(u2 == (old[0] && old[1] ? w2 : o2), "TDR2 update");
    check(u3 == (old[2] ? w3 : o3), "TDR3 update");
  endtask

  task automatic configure(input logic [2:0] t);
    int guard = 0;
    while (cfg != t && guard < 4) begin
      csu({t[2], t[1], t[0] | (cfg[1] != t[1])});
      guard++;
    end
    check(cfg == t, $sformatf("configuration %b reached (now %b)", t, cfg));
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
    check(first == l, $sformatf("cfg %b: first 1 after %0d cycles, expected %0d", cfg, first, l));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(cfg == 3'b000, "reset: all de-asserted");
    for (int k = 0; k < 24; k++) begin
      logic [2:0] t;
      t = (k < 8) ? 3'(k) : 3'($urandom);
      configure(t);
      csu(t);
      session(cur_len(cfg));
    end
    // SIB1 A, SIB2 A, SIB3 D: 3 SIB bits + 3 + 4 = 10
    // SIB1 A, SIB2 D, SIB3 A: 3 + 3 + 5 = 11;  SIB1 D, SIB3 D: 2
    configure(3'b011); session(10);
    configure(3'b101); session(3 + L1 + L3);
    configure(3'b000); session(2);
    check(LMAX == 15, "longest path is 15 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

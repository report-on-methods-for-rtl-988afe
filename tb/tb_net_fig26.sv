// tb_net_fig26: self-checking test of the three-SIB / one-ScanMux example
// network (TDR lengths 4, 5, 6, 7, 8). Every combination of {ScanMux, SIB3,
// SIB2, SIB1} states is reached through as many CSUs as the hierarchy needs;
// in each configuration the path length is measured with the flush/alternating
// session procedure, and every TDR on the path is read (capture) and written
// (update) and checked, while TDRs off the path must keep their value.
module tb_net_fig26;
  localparam int L1 = 4, L2 = 5, L3 = 6, L4 = 7, L5 = 8;
  localparam int LMAX = 2 + L1 + 1 + L2 + L4 + 1 + L5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, tdi = 1'b0, tdo;
  logic [L1-1:0] c1, u1;
  logic [L2-1:0] c2, u2;
  logic [L3-1:0] c3, u3;
  logic [L4-1:0] c4, u4;
  logic [L5-1:0] c5, u5;
  logic [3:0] cfg;

  net_fig26 #(.L1(L1), .L2(L2), .L3(L3), .L4(L4), .L5(L5)) dut (
    .clk, .rst_n, .capture_en(cap), .shift_en(sh), .update_en(upd), .tdi, .tdo,
    .tdr_cap_1(c1), .tdr_cap_2(c2), .tdr_cap_3(c3), .tdr_cap_4(c4), .tdr_cap_5(c5),
    .tdr_upd_1(u1), .tdr_upd_2(u2), .tdr_upd_3(u3), .tdr_upd_4(u4), .tdr_upd_5(u5),
    .cfg);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cur_len(input logic [3:0] c);
    int n;
    n = 2;
    if (c[2]) n += L5;
    if (c[0]) begin
      n += L1 + 1;
      if (c[1]) n += L2 + 1 + (c[3] ? L4 : L3);
    end
    return n;
  endfunction

  // path contents, TDO side first:
  // SIB3, [TDR5], SIB1, [SIB2, [S, TDR3|TDR4, TDR2], TDR1]
  logic [63:0] vin, vexp;
  logic [L1-1:0] w1; logic [L2-1:0] w2; logic [L3-1:0] w3; logic [L4-1:0] w4; logic [L5-1:0] w5;
  task automatic build(input logic [3:0] nxt);
    int p;
    vin = '0; vexp = '0; p = 0;
    vin[p] = nxt[2]; vexp[p] = cfg[2]; p++;
    if (cfg[2]) begin vin[p +: L5] = w5; vexp[p +: L5] = c5; p += L5; end
    vin[p] = nxt[0]; vexp[p] = cfg[0]; p++;
    if (cfg[0]) begin
      vin[p] = nxt[1]; vexp[p] = cfg[1]; p++;
      if (cfg[1]) begin
        vin[p] = nxt[3]; vexp[p] = cfg[3]; p++;
        if (cfg[3]) begin vin[p +: L4] = w4; vexp[p +: L4] = c4; p += L4; end
        else        begin vin[p +: L3] = w3; vexp[p +: L3] = c3; p += L3; end
        vin[p +: L2] = w2; vexp[p +: L2] = c2; p += L2;
      end
      vin[p +: L1] = w1; vexp[p +: L1] = c1; p += L1;
    end
  endtask

  // one CSU with random TDR data; checks the captured data and the updates
  task automatic csu(input logic [3:0] nxt);
    int len;
    logic [63:0] out;
    logic [3:0] old;
    logic [L1-1:0] o1; logic [L2-1:0] o2; logic [L3-1:0] o3; logic [L4-1:0] o4; logic [L5-1:0] o5;
    c1 = L1'($urandom); c2 = L2'($urandom); c3 = L3'($urandom); c4 = L4'($urandom); c5 = L5'($urandom);
    w1 = L1'($urandom); w2 = L2'($urandom); w3 = L3'($urandom); w4 = L4'($urandom); w5 = L5'($urandom);
    o1 = u1; o2 = u2; o3 = u3; o4 = u4; o5 = u5;
    old = cfg;
    build(nxt);
    len = cur_len(cfg);
    out = '0;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < len; i++) begin
      out[i] = tdo;
      tdi = vin[i];
      @(negedge clk);
    end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
    check(out == vexp, $sformatf("cfg %b captured %h expected %h", old, out, vexp));
    check(u5 == (old[2] ? w5 : o5), "TDR5 update");
    check(u1 == (old[0] ? w1 : o1), "TDR1 update");
    check(u2 == (old[0] && old[1] ? w2 : o2), "TDR2 update");
    check(u3 == (old[0] && old[1] && !old[3] ? w3 : o3), "TDR3 update");
    check(u4 == (old[0] && old[1] && old[3] ? w4 : o4), "TDR4 update");
  endtask

  // reach target configuration t; hidden modules need their parent opened
  task automatic configure(input logic [3:0] t);
    logic [3:0] nxt;
    int guard;
    guard = 0;
    while (cfg != t && guard < 6) begin
      nxt[3] = t[3];
      nxt[2] = t[2];
      nxt[1] = t[1] | (cfg[3] != t[3]);
      nxt[0] = t[0] | (cfg[1] != t[1]) | (cfg[3] != t[3]);
      csu(nxt);
      guard++;
    end
    check(cfg == t, $sformatf("configuration %b reached (now %b)", t, cfg));
  endtask

  // session test phase on the current path
  task automatic session(input int l);
    int first;
    sh = 1'b1;
    tdi = 1'b0;
    repeat (LMAX) @(negedge clk);
    first = -1;
    for (int k = 0; k < l + 2; k++) begin
      if (tdo && first < 0) first = k;
      tdi = !k[0];
      @(negedge clk);
    end
    sh = 1'b0;
    check(first == l, $sformatf("cfg %b: first 1 after %0d cycles, expected %0d", cfg, first, l));
  endtask

  initial begin
    logic [3:0] t;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(cfg == 4'b0000, "reset configuration");
    session(2);
    for (int k = 0; k < 40; k++) begin
      t = (k < 16) ? 4'(k) : 4'($urandom);
      configure(t);
      csu(t);
      session(cur_len(cfg));
    end
    check(LMAX == 28, "longest path is 28 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

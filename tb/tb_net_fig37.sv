// tb_net_fig37: self-checking test of the three-controller network, which
// rebuilds the network's state machine from the hardware. States are the
// control values {C2, C1, C0}. Starting from reset (000), it explores
// breadth-first: for every reached state s and every value t it resets the
// network, replays a known access sequence to s, performs one access that
// writes t into the control bits on the path (random instrument data) and
// reads back the new state. Each access is checked bit by bit against a
// model of the active path, and its clock cycles against the path length of
// s plus 2 (Table 9 components, 20-bit instruments). The measured edges and
// costs then go through an all-pairs shortest-path search that prefers, among
// equally cheap paths, the one with fewer accesses; the access counts must
// equal the printed pairwise table, whose maximum (the upper bound on the
// accesses needed) is 4.
module tb_net_fig37;
  localparam int LI = 20;
  localparam int LEN[7] = '{LI, 1, 1, LI, 1, LI, LI};   // I1, C0, C1, I2, C2, I3, I4
  localparam int HOPS[8][8] = '{
    '{0, 1, 1, 1, 3, 3, 2, 2}, '{1, 0, 2, 2, 4, 4, 3, 3},
    '{1, 1, 0, 1, 3, 3, 2, 2}, '{2, 2, 1, 0, 2, 2, 1, 1},
    '{3, 3, 2, 2, 0, 1, 1, 1}, '{4, 4, 3, 3, 1, 0, 2, 2},
    '{3, 3, 2, 2, 1, 1, 0, 1}, '{2, 2, 1, 1, 2, 2, 1, 0}};
  localparam int INF = 1000000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, tdi = 1'b0, tdo;
  logic [2:0] cfg;

  net_fig37 dut (.clk, .rst_n, .capture_en(cap), .shift_en(sh), .update_en(upd), .tdi, .tdo, .cfg);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always_ff @(posedge clk) if (cap || sh || upd) cyc <= cyc + 1;

  logic [31:0] mval [7];
  logic [2:0]  mstate;

  // active path of a state, from tdo
  function automatic void path_of(input logic [2:0] s, ref int ids[$]);
    ids.delete();
    ids.push_back(0); ids.push_back(1);
    if (!s[0]) begin ids.push_back(2); ids.push_back(3); end
    else if (s[1]) begin ids.push_back(4); ids.push_back(s[2] ? 6 : 5); end
  endfunction

  // one access writing t into the control bits on the path; returns cycles
  task automatic csu(input logic [2:0] t, output int ncyc);
    int ids[$];
    logic [127:0] vin, vexp, out;
    logic [31:0] nv [7];
    int off = 0, c_start;
    path_of(mstate, ids);
    for (int k = 0; k < 7; k++) nv[k] = $urandom;
    nv[1] = 32'(t[0]); nv[2] = 32'(t[1]); nv[4] = 32'(t[2]);
    vin = '0; vexp = '0;
    foreach (ids[j]) begin
      for (int b = 0; b < LEN[ids[j]]; b++) begin
        vin[off + b] = nv[ids[j]][b];
        vexp[off + b] = mval[ids[j]][b];
      end
      off += LEN[ids[j]];
    end
    out = '0;
    c_start = cyc;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < off; i++) begin out[i] = tdo; tdi = vin[i]; @(negedge clk); end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
    ncyc = cyc - c_start;
    check(out == vexp, $sformatf("state %b: %0d-bit capture mismatch", mstate, off));
    check(ncyc == off + 2, $sformatf("state %b: %0d cycles for %0d path bits", mstate, ncyc, off));
    foreach (ids[j]) mval[ids[j]] = nv[ids[j]] & ((LEN[ids[j]] == 32) ? '1 : ((32'd1 << LEN[ids[j]]) - 1));
    mstate = {mval[4][0], mval[2][0], mval[1][0]};
    check(cfg == mstate, $sformatf("state after access %b, model %b", cfg, mstate));
  endtask

  task automatic reset_net();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 7; k++) mval[k] = '0;
    mstate = 3'b000;
    check(cfg == 3'b000, "reset clears the controllers");
  endtask

  int cost [8][8], hops [8][8];
  int route [8][$];
  bit found [8];
  int order [$];

  initial begin
    int c, s, nc, nh, worst;
    int exp_len;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin cost[i][j] = (i == j) ? 0 : INF; hops[i][j] = 0; end
    found[0] = 1'b1;
    order.push_back(0);
    // breadth-first exploration of the hardware
    for (int q = 0; q < order.size(); q++) begin
      s = order[q];
      for (int t = 0; t < 8; t++) begin
        reset_net();
        foreach (route[s][k]) csu(3'(route[s][k]), c);
        check(cfg == 3'(s), $sformatf("replayed route reaches %b", 3'(s)));
        csu(3'(t), c);
        // Table 9: I2, C1, C0, I1 / C0, I1 / I3 or I4, C2, C0, I1
        exp_len = !s[0] ? 2 * LI + 2 : (s[1] ? 2 * LI + 2 : LI + 1);
        check(c == exp_len + 2, $sformatf("state %b: access takes %0d cycles", 3'(s), c));
        if (int'(cfg) != s) begin
          cost[s][cfg] = c; hops[s][cfg] = 1;
          if (!found[cfg]) begin
            found[cfg] = 1'b1;
            route[cfg] = route[s];
            route[cfg].push_back(t);
            order.push_back(int'(cfg));
          end
        end
      end
    end
    check(order.size() == 8, $sformatf("%0d of 8 states reachable", order.size()));
    // all-pairs shortest paths, fewer accesses among equal costs
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          if (cost[i][k] >= INF || cost[k][j] >= INF) continue;
          nc = cost[i][k] + cost[k][j];
          nh = hops[i][k] + hops[k][j];
          if (nc < cost[i][j] || (nc == cost[i][j] && nh < hops[i][j])) begin
            cost[i][j] = nc; hops[i][j] = nh;
          end
        end
    worst = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        check(hops[i][j] == HOPS[i][j],
              $sformatf("%b -> %b: %0d accesses, table %0d", 3'(i), 3'(j), hops[i][j], HOPS[i][j]));
        if (hops[i][j] > worst) worst = hops[i][j];
      end
    check(worst == 4, $sformatf("upper bound %0d accesses, expected 4", worst));
    check(cost[0][3] == 44, $sformatf("000 -> 011 costs %0d cycles (one access)", cost[0][3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

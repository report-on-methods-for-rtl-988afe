// tb_fmi_network: drives the example network's scan port directly and checks
// the scan path length for several SIB configurations (worked out from the
// structure: 4 bits per SIB plus each open SIB's child segment), that a value
// shifted in reaches the right instrument, and the top-level flags for
// uncorrected, corrected and several faults. Register lengths are reduced to
// 5, 3 and 6 bits.
module tb_fmi_network;
  localparam int L1 = 5, L2 = 3, L3 = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, si = 1'b0, so, nf, nc;
  logic [2:0] inst_f = '0, inst_c = '1;
  logic [L1-1:0] rd1 = '0, wr1;
  logic [L2-1:0] rd2 = '0, wr2;
  logic [L3-1:0] rd3 = '0, wr3;
  logic [3:0] sib_open, sib_mask;

  fmi_network #(.LEN_R1(L1), .LEN_R2(L2), .LEN_R3(L3)) dut (
    .clk, .rst_n, .sel(1'b1), .capture_en(cap), .shift_en(sh), .update_en(upd),
    .si, .so, .net_f(nf), .net_c(nc), .inst_f, .inst_c,
    .inst_rd_1(rd1), .inst_rd_2(rd2), .inst_rd_3(rd3),
    .inst_wr_1(wr1), .inst_wr_2(wr2), .inst_wr_3(wr3), .sib_open, .sib_mask
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic shift1(input logic b, output logic o);
    @(negedge clk);
    sh = 1'b1; si = b;
    #1 o = so;
    @(negedge clk);
    sh = 1'b0;
  endtask
  // shift a vector, element 0 first
  task automatic shiftv(input logic b [], output logic o []);
    o = new[b.size()];
    for (int i = 0; i < b.size(); i++) shift1(b[i], o[i]);
  endtask
  task automatic pulse_upd();
    @(negedge clk) upd = 1'b1; @(negedge clk) upd = 1'b0;
  endtask
  task automatic pulse_cap();
    @(negedge clk) cap = 1'b1; @(negedge clk) cap = 1'b0;
  endtask
  task automatic path_len(output int n);
    logic o;
    for (int i = 0; i < 40; i++) shift1(1'b0, o);
    n = -1;
    for (int i = 0; i < 40; i++) begin
      shift1(i == 0, o);
      if (o && n < 0) n = i;
    end
  endtask
  function automatic int exp_len(input logic [3:0] op);
    int n = 8;
    if (op[0]) n += L1;
    if (op[1]) n += 8 + (op[2] ? L2 : 0) + (op[3] ? L3 : 0);
    return n;
  endfunction

  // bits for one SIB in shift order: F, C, X, S
  function automatic void push_sib(ref logic v [$], input logic x, input logic s);
    v.push_back(1'b0); v.push_back(1'b0); v.push_back(x); v.push_back(s);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic q [$];
  logic o [];
  logic b [];
  int n;
  logic [L3-1:0] v3;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    path_len(n);
    check(n == exp_len(4'b0000), $sformatf("reset path %0d", n));
    check(nf == 1'b0 && nc == 1'b1, "no fault at reset");

    // open SIB2 and SIB1: shift SIB2's bits first (nearest scan output)
    q = {};
    push_sib(q, 1'b0, 1'b1);   // SIB2
    push_sib(q, 1'b0, 1'b1);   // SIB1
    b = q; shiftv(b, o);
    pulse_upd();
    check(sib_open == 4'b0011, "SIB1 and SIB2 open");
    path_len(n);
    check(n == exp_len(4'b0011), $sformatf("path with SIB1, SIB2 open: %0d", n));

    // open SIB4 too; chain from so: SIB2, SIB4, SIB3, SIB1, R1
    q = {};
    push_sib(q, 1'b0, 1'b1);   // SIB2
    push_sib(q, 1'b0, 1'b1);   // SIB4
    push_sib(q, 1'b0, 1'b0);   // SIB3
    push_sib(q, 1'b0, 1'b1);   // SIB1
    for (int i = 0; i < L1; i++) q.push_back(1'b0);
    b = q; shiftv(b, o);
    pulse_upd();
    check(sib_open == 4'b1011, "SIB4 opened");
    path_len(n);
    check(n == exp_len(4'b1011), $sformatf("path with SIB1, SIB2, SIB4 open: %0d", n));

    // write R3 (least significant bit first) through the path
    v3 = L3'($urandom);
    q = {};
    push_sib(q, 1'b0, 1'b1);   // SIB2
    push_sib(q, 1'b0, 1'b1);   // SIB4
    for (int i = 0; i < L3; i++) q.push_back(v3[i]);
    push_sib(q, 1'b0, 1'b0);   // SIB3
    push_sib(q, 1'b0, 1'b1);   // SIB1
    for (int i = 0; i < L1; i++) q.push_back(1'b0);
    b = q; shiftv(b, o);
    pulse_upd();
    check(wr3 == v3, $sformatf("R3 written %h expected %h", wr3, v3));

    // capture reads R3's instrument value and the SIB flags
    rd3 = L3'($urandom);
    inst_f[2] = 1'b1; inst_c[2] = 1'b0;
    #1 check(nf && !nc, "uncorrected fault in I3 reaches the top");
    repeat (3) @(posedge clk);
    pulse_cap();
    b = new[4 + 4 + L3];
    foreach (b[i]) b[i] = 1'b0;
    b[3] = 1'b1; b[7] = 1'b1;  // keep SIB2 and SIB4 open if updated later
    shiftv(b, o);
    check(o[0] == 1'b1 && o[1] == 1'b0, "SIB2 captured F=1 C=0");
    check(o[4] == 1'b1 && o[5] == 1'b0, "SIB4 captured F=1 C=0");
    for (int i = 0; i < L3; i++) begin
      if (o[8 + i] != rd3[i]) begin
        check(1'b0, $sformatf("R3 read bit %0d", i));
        break;
      end
    end
    check(1'b1, "R3 read complete");

    // corrected fault in I1 with I3 cleared: F=1, C=1; both: F=1, C=0
    inst_f[2] = 1'b0; inst_c[2] = 1'b1;
    inst_f[0] = 1'b1; inst_c[0] = 1'b1;
    #1 check(nf && nc, "corrected fault: F=1 C=1");
    inst_f[1] = 1'b1; inst_c[1] = 1'b0;
    #1 check(nf && !nc, "corrected plus uncorrected: F=1 C=0");
    inst_f[0] = 1'b0;
    #1 check(nf && !nc, "uncorrected fault in I2 alone: F=1 C=0");
    inst_f[1] = 1'b0; inst_c[1] = 1'b1;
    #1 check(!nf && nc, "no fault: F=0 C=1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

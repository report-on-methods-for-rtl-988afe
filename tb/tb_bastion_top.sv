// tb_bastion_top: end-to-end test of the top level at its default sizes
// (645 input / 4,596 output wrapper cells, 32/16/32-bit instrument registers).
// It drives every design through its ports and counts each mechanism; the test
// fails if any mechanism never happened.
//  - fault management: READ, WRITE, OPEN, SET_X (masking), CLOSE_ALL,
//    CLOSE_AFTER, autonomous localization, abort of an access by a fault,
//    high- and low-priority interrupts; instruments are loop-back models.
//  - wrapper: functional capture, INTEST (input chain shifting into the core,
//    output chain capturing, safe outputs), EXTEST (input chain capturing pi,
//    output chain driving po); a testbench core model gives core_out.
//  - logic BIST over the wrapper: cycle count (n+1)*shift_len+n, a golden
//    signature that passes and a core fault that makes it fail.
//  - the dedicated and shared wrapper cells.
//  - network test: configure the four example networks through their
//    TAP-side ports and run session test phases (L + l + 2 cycles) on each,
//    with correct and with wrong expected lengths.
//  - multi-branch network: the four-access sequence that reaches I4 with
//    I1, I2 and I3 off the path, checked for the 124 clock cycles it takes.
//  - three-controller network: a four-access walk 000 -> 011 -> 110 -> 100
//    -> 101 through its states, with the cycles of each access.
module tb_bastion_top;
  import ijtag_pkg::*;
  localparam int NI = 645, NO = 4596;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // fault management
  logic fm_bus_we = 1'b0, fm_bus_addr = 1'b0;
  logic [31:0] fm_bus_wdata = '0, fm_bus_rdata;
  logic fm_irq_hi, fm_irq_lo;
  logic [2:0] fm_inst_f = '0, fm_inst_c = '1;
  logic [31:0] wr1, wr3;
  logic [15:0] wr2;
  logic [3:0] sib_open, sib_mask;
  localparam logic [31:0] K1 = 32'h1111_0001, K3 = 32'h3333_0003;
  localparam logic [15:0] K2 = 16'h2002;
  // wrapper / BIST
  logic test_en = 1'b0, extest_en = 1'b0, scan_en = 1'b0, safe_en = 1'b0;
  logic sii = 1'b0, sio = 1'b0, soi, soo;
  logic [NI-1:0] pi = '0, core_in;
  logic [NO-1:0] core_out, po;
  logic bist_start = 1'b0, bist_busy, bist_done, bist_pass;
  logic [31:0] bist_seed = 32'h1234_5678, bist_golden = '0, bist_sig;
  logic [15:0] bist_patterns = 16'd3, bist_shift_len = 16'(NO);
  logic core_fault = 1'b0;
  // wrapper cells
  logic d_se = 0, d_ce = 0, d_sc = 0, d_sv = 0, d_ti = 0, d_fi = 0, d_to, d_fo;
  logic s_se = 0, s_ce = 0, s_ti = 0, s_fi = 0, s_to, s_fo;
  // networks
  logic n28_cap = 0, n28_sh = 0, n28_upd = 0, n28_tdi = 0, n28_tdo;
  logic [2:0] n28_i1;
  logic [3:0] n28_i2 = 4'h5, n28_u2;
  logic [1:0] n28_cfg;
  logic n26_cap = 0, n26_sh = 0, n26_upd = 0, n26_tdi = 0, n26_tdo;
  logic [3:0] n26_u1; logic [4:0] n26_u2; logic [5:0] n26_u3; logic [6:0] n26_u4; logic [7:0] n26_u5;
  logic [3:0] n26_cfg;
  logic n28b_cap = 0, n28b_sh = 0, n28b_upd = 0, n28b_tdi = 0, n28b_tdo;
  logic [2:0] n28b_i1, n28b_cfg;
  logic [3:0] n28b_u2;
  logic [4:0] n28b_u3;
  logic n30_cap = 0, n30_sh = 0, n30_upd = 0, n30_tdi = 0, n30_tdo, n30_cfg;
  logic [2:0] n30_i1;
  logic [3:0] n30_u2;
  logic n34_cap = 0, n34_sh = 0, n34_upd = 0, n34_tdi = 0, n34_tdo;
  logic [19:0] n34_i4;
  logic [4:0] n34_cfg;
  logic n37_cap = 0, n37_sh = 0, n37_upd = 0, n37_tdi = 0, n37_tdo;
  logic [2:0] n37_cfg;
  logic st_start = 0, st_busy, st_done, st_pass;
  logic [1:0] st_net = '0;
  logic [15:0] st_long = '0, st_path = '0;
  logic [16:0] st_cycles;

  // core model: every output is the XOR of two core inputs
  always_comb
    for (int i = 0; i < NO; i++)
      core_out[i] = core_in[i % NI] ^ core_in[(i * 7 + 1) % NI] ^ (core_fault && i == 100);

  bastion_top dut (
    .clk, .rst_n,
    .fm_bus_we, .fm_bus_addr, .fm_bus_wdata, .fm_bus_rdata, .fm_irq_hi, .fm_irq_lo,
    .fm_inst_f, .fm_inst_c, .fm_inst_rd_1(wr1 ^ K1), .fm_inst_rd_2(wr2 ^ K2),
    .fm_inst_rd_3(wr3 ^ K3), .fm_inst_wr_1(wr1), .fm_inst_wr_2(wr2), .fm_inst_wr_3(wr3),
    .fm_sib_open(sib_open), .fm_sib_mask(sib_mask),
    .cw_test_en(test_en), .cw_extest_en(extest_en), .cw_scan_en(scan_en), .cw_safe_en(safe_en),
    .cw_scan_in_i(sii), .cw_scan_out_i(soi), .cw_scan_in_o(sio), .cw_scan_out_o(soo),
    .cw_pi(pi), .cw_core_in(core_in), .cw_core_out(core_out), .cw_po(po),
    .bist_start, .bist_seed, .bist_patterns, .bist_shift_len, .bist_golden,
    .bist_busy, .bist_done, .bist_pass, .bist_signature(bist_sig),
    .dwc_shift_en(d_se), .dwc_capture_en(d_ce), .dwc_safe_ctrl(d_sc), .dwc_safe_value(d_sv),
    .dwc_cti(d_ti), .dwc_cfi(d_fi), .dwc_cto(d_to), .dwc_cfo(d_fo),
    .swc_shift_en(s_se), .swc_capture_en(s_ce), .swc_cti(s_ti), .swc_cfi(s_fi),
    .swc_cto(s_to), .swc_cfo(s_fo),
    .n28_capture_en(n28_cap), .n28_shift_en(n28_sh), .n28_update_en(n28_upd),
    .n28_tdi, .n28_tdo, .n28_i1_out(n28_i1), .n28_i2_in(n28_i2), .n28_tdr2_upd(n28_u2),
    .n28_cfg,
    .n26_capture_en(n26_cap), .n26_shift_en(n26_sh), .n26_update_en(n26_upd),
    .n26_tdi, .n26_tdo, .n26_cap_1(4'h1), .n26_cap_2(5'h2), .n26_cap_3(6'h3),
    .n26_cap_4(7'h4), .n26_cap_5(8'h5), .n26_upd_1(n26_u1), .n26_upd_2(n26_u2),
    .n26_upd_3(n26_u3), .n26_upd_4(n26_u4), .n26_upd_5(n26_u5), .n26_cfg,
    .n28b_capture_en(n28b_cap), .n28b_shift_en(n28b_sh), .n28b_update_en(n28b_upd),
    .n28b_tdi, .n28b_tdo, .n28b_i1_out(n28b_i1), .n28b_i2_in(4'h9), .n28b_i3_in(5'h11),
    .n28b_tdr2_upd(n28b_u2), .n28b_tdr3_upd(n28b_u3), .n28b_cfg,
    .n30_capture_en(n30_cap), .n30_shift_en(n30_sh), .n30_update_en(n30_upd),
    .n30_tdi, .n30_tdo, .n30_i1_out(n30_i1), .n30_i2_in(4'h6), .n30_tdr2_upd(n30_u2), .n30_cfg,
    .n34_capture_en(n34_cap), .n34_shift_en(n34_sh), .n34_update_en(n34_upd),
    .n34_tdi, .n34_tdo, .n34_i4_upd(n34_i4), .n34_cfg,
    .n37_capture_en(n37_cap), .n37_shift_en(n37_sh), .n37_update_en(n37_upd),
    .n37_tdi, .n37_tdo, .n37_cfg,
    .st_start, .st_net, .st_long_len(st_long), .st_path_len(st_path),
    .st_busy, .st_done, .st_pass, .st_cycles
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum int {
    M_READ, M_WRITE, M_OPEN, M_SET_X, M_CLOSE_ALL, M_CLOSE_AFTER, M_LOCALIZE,
    M_ABORT, M_IRQ_HI, M_IRQ_LO, M_FUNCTIONAL, M_INTEST, M_EXTEST, M_SAFE,
    M_BIST_PASS, M_BIST_FAIL, M_DWC, M_SWC, M_SESSION_PASS, M_SESSION_FAIL, M_ACCESS_SEQ, M_STATE_STEP, M_NUM
  } mech_e;
  int mech [M_NUM];
  initial for (int i = 0; i < M_NUM; i++) mech[i] = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- bus helpers
  task automatic bus_write(input logic a, input logic [31:0] d);
    @(negedge clk);
    fm_bus_we = 1'b1; fm_bus_addr = a; fm_bus_wdata = d;
    @(negedge clk);
    fm_bus_we = 1'b0;
  endtask
  task automatic bus_read(input logic a, output logic [31:0] d);
    @(negedge clk);
    fm_bus_addr = a;
    #1 d = fm_bus_rdata;
  endtask
  logic [31:0] st;
  task automatic start_cmd(input im_op_e o, input int ia, input bit close_after);
    logic [31:0] c = '0;
    c[CMD_IA_LSB +: 8] = 8'(ia);
    c[CMD_OP_LSB +: 3] = o;
    c[CMD_START] = 1'b1;
    c[CMD_ACK_LO] = 1'b1;
    c[CMD_CLOSE_AFTER] = close_after;
    bus_write(1'b0, c);
  endtask
  task automatic wait_idle();
    do bus_read(1'b0, st); while (st[ST_BUSY]);
  endtask
  task automatic run_cmd(input im_op_e o, input int ia, input bit close_after);
    start_cmd(o, ia, close_after);
    wait_idle();
  endtask

  // ---------------------------------------------------------- network CSU
  task automatic n28_csu(input logic [15:0] v, input int len);
    @(negedge clk) n28_cap = 1'b1;
    @(negedge clk) n28_cap = 1'b0; n28_sh = 1'b1;
    for (int i = 0; i < len; i++) begin n28_tdi = v[i]; @(negedge clk); end
    n28_sh = 1'b0; n28_upd = 1'b1;
    @(negedge clk) n28_upd = 1'b0;
  endtask
  task automatic n26_csu(input logic [31:0] v, input int len);
    @(negedge clk) n26_cap = 1'b1;
    @(negedge clk) n26_cap = 1'b0; n26_sh = 1'b1;
    for (int i = 0; i < len; i++) begin n26_tdi = v[i]; @(negedge clk); end
    n26_sh = 1'b0; n26_upd = 1'b1;
    @(negedge clk) n26_upd = 1'b0;
  endtask
  task automatic n28b_csu(input logic [15:0] v, input int len);
    @(negedge clk) n28b_cap = 1'b1;
    @(negedge clk) n28b_cap = 1'b0; n28b_sh = 1'b1;
    for (int i = 0; i < len; i++) begin n28b_tdi = v[i]; @(negedge clk); end
    n28b_sh = 1'b0; n28b_upd = 1'b1;
    @(negedge clk) n28b_upd = 1'b0;
  endtask
  // multi-branch network: one access of len bits, returns its clock cycles
  task automatic n34_csu(input logic [63:0] v, input int len, output int cyc);
    cyc = 0;
    @(negedge clk) n34_cap = 1'b1; cyc++;
    @(negedge clk) n34_cap = 1'b0; n34_sh = 1'b1;
    for (int i = 0; i < len; i++) begin n34_tdi = v[i]; @(negedge clk); cyc++; end
    n34_sh = 1'b0; n34_upd = 1'b1;
    @(negedge clk) n34_upd = 1'b0; cyc++;
  endtask

  // three-controller network: one access of len bits, returns its clock cycles
  task automatic n37_csu(input logic [63:0] v, input int len, output int cyc);
    cyc = 0;
    @(negedge clk) n37_cap = 1'b1; cyc++;
    @(negedge clk) n37_cap = 1'b0; n37_sh = 1'b1;
    for (int i = 0; i < len; i++) begin n37_tdi = v[i]; @(negedge clk); cyc++; end
    n37_sh = 1'b0; n37_upd = 1'b1;
    @(negedge clk) n37_upd = 1'b0; cyc++;
  endtask

  task automatic n30_csu(input logic [15:0] v, input int len);
    @(negedge clk) n30_cap = 1'b1;
    @(negedge clk) n30_cap = 1'b0; n30_sh = 1'b1;
    for (int i = 0; i < len; i++) begin n30_tdi = v[i]; @(negedge clk); end
    n30_sh = 1'b0; n30_upd = 1'b1;
    @(negedge clk) n30_upd = 1'b0;
  endtask
  task automatic session(input logic [1:0] net, input int ll, input int l, input bit expect_pass);
    @(negedge clk);
    st_net = net; st_long = 16'(ll); st_path = 16'(l); st_start = 1'b1;
    @(negedge clk) st_start = 1'b0;
    while (!st_done) @(negedge clk);
    check(st_pass == expect_pass, $sformatf("session net %0d L=%0d l=%0d pass=%0b", net, ll, l, st_pass));
    check(int'(st_cycles) == ll + l + 2, $sformatf("session took %0d cycles, expected %0d", st_cycles, ll + l + 2));
    if (st_pass) mech[M_SESSION_PASS]++; else mech[M_SESSION_FAIL]++;
  endtask

  // ---------------------------------------------------------- BIST
  int bcyc;
  task automatic bist_run(input logic [31:0] golden);
    bist_golden = golden;
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    bcyc = 1;
    while (!bist_done) begin
      @(negedge clk);
      if (bist_busy) bcyc++;
      if (bcyc == 100) check(&po, "outputs safe during BIST");
    end
  endtask

  int addr_of [3] = '{6, 4, 2};
  logic [31:0] v, d, k, mask, sig0;
  logic [NI-1:0] bits_i;
  logic [NO-1:0] cap_o;
  int irq_hi_seen;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // ======================================================= fault management
    for (int r = 0; r < 3; r++) begin
      v = $urandom;
      mask = (r == 1) ? 32'h0000_ffff : 32'hffff_ffff;
      k = (r == 0) ? K1 : (r == 1) ? {16'h0, K2} : K3;
      bus_write(1'b1, v);
      run_cmd(OP_WRITE, addr_of[r], 1'b0);
      check(st[ST_DONE] && !st[ST_ERROR], $sformatf("write I%0d", r + 1));
      if (st[ST_DONE]) mech[M_WRITE]++;
      run_cmd(OP_READ, addr_of[r], 1'b0);
      bus_read(1'b1, d);
      check(d == ((v & mask) ^ k), $sformatf("I%0d read %h expected %h", r + 1, d, (v & mask) ^ k));
      if (d == ((v & mask) ^ k)) mech[M_READ]++;
      check(fm_irq_lo, "command completion raises irq_lo");
      if (fm_irq_lo) mech[M_IRQ_LO]++;
    end
    run_cmd(OP_CLOSE_ALL, 0, 1'b0);
    check(sib_open == 4'b0000, "close all");
    if (sib_open == 4'b0000) mech[M_CLOSE_ALL]++;
    run_cmd(OP_OPEN, 2, 1'b0);
    check(sib_open == 4'b1010, $sformatf("open path to R3: SIB2 and SIB4, got %b", sib_open));
    if (sib_open == 4'b1010) mech[M_OPEN]++;
    run_cmd(OP_READ, 4, 1'b1);
    check(st[ST_DONE] && sib_open == 4'b0000, "read with close-after leaves the network closed");
    if (st[ST_DONE] && sib_open == 4'b0000) mech[M_CLOSE_AFTER]++;

    // masking: X on SIB1 hides a fault in I1
    bus_write(1'b1, 32'h1);
    run_cmd(OP_SET_X, 5, 1'b0);
    check(sib_mask == 4'b0001, "SIB1 masked");
    fm_inst_f[0] = 1'b1; fm_inst_c[0] = 1'b0;
    repeat (40) @(posedge clk);
    bus_read(1'b0, st);
    check(!fm_irq_hi && !st[ST_TOP_F], "masked fault not propagated");
    if (sib_mask == 4'b0001 && !fm_irq_hi) mech[M_SET_X]++;
    // unmasking lets it through: autonomous localization to R1
    bus_write(1'b1, 32'h0);
    run_cmd(OP_SET_X, 5, 1'b0);
    repeat (10) @(posedge clk);
    wait_idle();
    check(fm_irq_hi, "unmasked uncorrected fault raises irq_hi");
    if (fm_irq_hi) mech[M_IRQ_HI]++;
    check(st[ST_LOC_VALID] && int'(st[ST_LOC_ADDR_LSB +: 8]) == 6, "fault localized at R1");
    if (st[ST_LOC_VALID] && int'(st[ST_LOC_ADDR_LSB +: 8]) == 6) mech[M_LOCALIZE]++;
    fm_inst_f[0] = 1'b0; fm_inst_c[0] = 1'b1;
    repeat (5) @(posedge clk);
    bus_write(1'b0, (32'h1 << CMD_ACK_HI) | (32'h1 << CMD_ACK_LO));
    run_cmd(OP_CLOSE_ALL, 0, 1'b0);

    // abort: a fault in I3 during a read of R2 from the closed network
    start_cmd(OP_READ, 4, 1'b0);
    repeat (5) @(posedge clk);
    fm_inst_f[2] = 1'b1; fm_inst_c[2] = 1'b0;
    wait_idle();
    check(st[ST_ABORTED], "read aborted by the fault");
    check(st[ST_LOC_VALID] && int'(st[ST_LOC_ADDR_LSB +: 8]) == 2, "fault localized at R3 after abort");
    if (st[ST_ABORTED] && st[ST_LOC_VALID]) mech[M_ABORT]++;
    fm_inst_f[2] = 1'b0; fm_inst_c[2] = 1'b1;
    repeat (5) @(posedge clk);
    bus_write(1'b0, (32'h1 << CMD_ACK_HI) | (32'h1 << CMD_ACK_LO));
    // corrected fault: low priority only
    fm_inst_f[1] = 1'b1; fm_inst_c[1] = 1'b1;
    repeat (40) @(posedge clk);
    check(fm_irq_lo && !fm_irq_hi, "corrected fault raises irq_lo only");
    if (fm_irq_lo && !fm_irq_hi) mech[M_IRQ_LO]++;
    fm_inst_f[1] = 1'b0;

    // ======================================================= wrapper
    // functional: the input cells pass pi to the core one cycle later
    test_en = 1'b0; scan_en = 1'b0;
    pi = {21{$urandom}};
    @(negedge clk); @(negedge clk);
    check(core_in == pi, "functional mode: core_in follows pi");
    if (core_in == pi) mech[M_FUNCTIONAL]++;
    // INTEST: load the input chain, core isolated from pi, capture responses
    test_en = 1'b1; extest_en = 1'b0; scan_en = 1'b1; safe_en = 1'b1;
    for (int i = 0; i < NI; i++) begin
      bits_i[i] = 1'($urandom);
      sii = bits_i[i];
      pi = {21{$urandom}};
      @(negedge clk);
    end
    d = 0;
    for (int i = 0; i < NI; i++) if (core_in[i] != bits_i[NI-1-i]) d++;
    check(d == 0, $sformatf("INTEST: %0d input cells wrong", d));
    check(&po, "INTEST safe mode: all outputs at the safe value 1");
    if (&po) mech[M_SAFE]++;
    cap_o = core_out;
    scan_en = 1'b0;
    @(negedge clk);
    scan_en = 1'b1;
    d = 0;
    for (int i = 0; i < NO; i++) begin
      if (soo != cap_o[NO-1-i]) d++;
      @(negedge clk);
    end
    check(d == 0, $sformatf("INTEST: %0d captured responses wrong", d));
    if (d == 0) mech[M_INTEST]++;
    // EXTEST: capture pi, shift it out; output chain drives po
    extest_en = 1'b1; safe_en = 1'b0;
    pi = {21{$urandom}};
    scan_en = 1'b0;
    @(negedge clk);
    scan_en = 1'b1;
    d = 0;
    for (int i = 0; i < NI; i++) begin
      if (soi != pi[NI-1-i]) d++;
      sio = 1'b1;
      @(negedge clk);
    end
    check(d == 0, $sformatf("EXTEST: %0d captured inputs wrong", d));
    for (int i = 0; i < NO - NI; i++) @(negedge clk);
    check(&po, "EXTEST: output chain drives po");
    if (d == 0 && &po) mech[M_EXTEST]++;
    test_en = 1'b0; extest_en = 1'b0; scan_en = 1'b0; sio = 1'b0;

    // ======================================================= logic BIST
    bist_run(32'h0);
    sig0 = bist_sig;
    check(bcyc == 4 * NO + 3, $sformatf("BIST took %0d cycles, expected %0d", bcyc, 4 * NO + 3));
    bist_run(sig0);
    check(bist_pass && bist_sig == sig0, "BIST repeatable, passes with its golden signature");
    if (bist_pass) mech[M_BIST_PASS]++;
    core_fault = 1'b1;
    bist_run(sig0);
    check(!bist_pass, "BIST detects a core output fault");
    if (!bist_pass) mech[M_BIST_FAIL]++;
    core_fault = 1'b0;

    // ======================================================= wrapper cells
    d_fi = 1'b1; d_ce = 1'b0; #1;
    check(d_fo == 1'b1, "dedicated cell transparent");
    @(negedge clk) d_se = 1'b1; d_ti = 1'b0;
    @(negedge clk) d_se = 1'b0; d_ce = 1'b1; #1;
    check(d_fo == 1'b0 && d_to == 1'b0, "dedicated cell drives its scanned value");
    d_sc = 1'b1; d_sv = 1'b1; #1;
    check(d_fo == 1'b1, "dedicated cell safe value");
    if (d_fo) mech[M_DWC]++;
    d_sc = 1'b0;
    s_ce = 1'b0; s_fi = 1'b1;
    @(negedge clk);
    check(s_fo == 1'b1 && s_to == 1'b1, "shared cell captures cfi");
    s_ce = 1'b1; s_se = 1'b1; s_ti = 1'b0;
    @(negedge clk);
    check(s_fo == 1'b0, "shared cell shifts cti");
    s_se = 1'b0; s_ti = 1'b1;
    @(negedge clk);
    check(s_fo == 1'b0, "shared cell holds");
    if (s_fo == 1'b0) mech[M_SWC]++;

    // ======================================================= network test
    session(2'd0, 9, 2, 1'b1);
    n28_csu(16'b10, 2);                      // SIB1 asserted, SIB2 de-asserted
    check(n28_cfg == 2'b01, "network #1: SIB1 asserted");
    session(2'd0, 9, 5, 1'b1);
    session(2'd0, 9, 6, 1'b0);               // wrong length is detected
    n28_csu(16'b0000_01, 5);                 // SIB2 asserted, SIB1 de-asserted
    check(n28_cfg == 2'b10, "network #1: SIB2 asserted");
    session(2'd0, 9, 6, 1'b1);
    n26_csu(32'b11, 2);                      // SIB3 and SIB1 asserted
    check(n26_cfg == 4'b0101, "three-SIB network: SIB1 and SIB3 asserted");
    session(2'd1, 28, 15, 1'b1);
    n28b_csu(16'b01, 2);                     // network #2: SIB3 asserted
    check(n28b_cfg == 3'b100, "network #2: SIB3 asserted");
    session(2'd2, 15, 7, 1'b1);
    session(2'd2, 15, 2, 1'b0);
    n30_csu(16'b1, 4);                       // network #3: ScanMux to TDR2
    check(n30_cfg == 1'b1, "network #3: ScanMux selects TDR2");
    session(2'd3, 5, 5, 1'b1);

    // multi-branch network: reach I4 in four accesses (path bits from tdo:
    // I0 = 20, C0 = 2, then the branch), expected 124 clock cycles in total
    begin
      int c, tot;
      logic [19:0] w;
      w = 20'($urandom);
      tot = 0;
      n34_csu({42'b0, 2'b11, 20'b0} | 64'(1) << 22, 23, c); tot += c;    // C3=1, C0=11
      n34_csu({41'b0, 1'b1, 2'b10, 20'b0}, 23, c); tot += c;             // C1=1, C0=10
      n34_csu({36'b0, 1'b1, 5'b0, 2'b01, 20'b0}, 28, c); tot += c;       // C2=1, C0=01
      n34_csu({22'b0, w, 2'b01, 20'b0}, 42, c); tot += c;                 // write I4
      check(n34_cfg == 5'b11101, $sformatf("multi-branch network: cfg %b", n34_cfg));
      check(n34_i4 == w, "multi-branch network: I4 written");
      check(tot == 124, $sformatf("multi-branch network: %0d cycles, expected 124", tot));
      if (n34_i4 == w && tot == 124) mech[M_ACCESS_SEQ]++;
    end

    // three-controller network: 000 -> 011 -> 110 -> 100 -> 101, each step
    // one access over the 42-bit path of the current state (from tdo: I1,
    // C0, then C1 and I2, or C2 and I3)
    begin
      int c, tot;
      tot = 0;
      n37_csu({22'b0, 20'($urandom), 1'b1, 1'b1, 20'($urandom)}, 42, c); tot += c; // C1=1, C0=1
      check(n37_cfg == 3'b011, "three-controller network: state 011");
      n37_csu({22'b0, 20'($urandom), 1'b1, 1'b0, 20'($urandom)}, 42, c); tot += c; // C2=1, C0=0
      check(n37_cfg == 3'b110, "three-controller network: state 110");
      n37_csu({22'b0, 20'($urandom), 1'b0, 1'b0, 20'($urandom)}, 42, c); tot += c; // C1=0
      check(n37_cfg == 3'b100, "three-controller network: state 100");
      n37_csu({22'b0, 20'($urandom), 1'b0, 1'b1, 20'($urandom)}, 42, c); tot += c; // C0=1
      check(n37_cfg == 3'b101, "three-controller network: state 101");
      check(tot == 4 * 44, $sformatf("three-controller network: %0d cycles", tot));
      if (n37_cfg == 3'b101 && tot == 176) mech[M_STATE_STEP]++;
    end

    for (int i = 0; i < M_NUM; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s exercised %0d times", mech_e'(i), mech[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_instrument_manager: self-checking test of the instrument manager driving
// the example fault-flag network (SIB1[R1] SIB2[SIB3[R2] SIB4[R3]]).
//
// It issues READ, WRITE, OPEN, SET_X, CLOSE_ALL and CLOSE_AFTER commands and
// checks the data, the resulting SIB states and the exact number of clock
// cycles spent in capture-shift-update sequences. Expected cycle counts come
// from csu_len(), a model of the walk written from the network structure: one
// capture cycle, one cycle per visited node, one per bit, one for the end of
// the map, one update cycle. It then injects instrument faults to check
// masking, autonomous localization, aborting an access, corrected-fault
// interrupts, two simultaneous faults and rejected commands.
module tb_instrument_manager;
  import ijtag_pkg::*;

  localparam int L1 = 32, L2 = 16, L3 = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bus_we = 1'b0, bus_addr = 1'b0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic irq_hi, irq_lo;
  logic sel, cap, sh, upd, si, so, nf, nc;
  logic [2:0] inst_f = 3'b000, inst_c = 3'b111;
  logic [L1-1:0] rd1 = '0, wr1;
  logic [L2-1:0] rd2 = '0, wr2;
  logic [L3-1:0] rd3 = '0, wr3;
  logic [3:0] sib_open, sib_mask;

  instrument_manager u_im (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq_hi, .irq_lo,
    .net_sel(sel), .net_capture(cap), .net_shift(sh), .net_update(upd),
    .net_si(si), .net_so(so), .net_f(nf), .net_c(nc)
  );

  fmi_network u_net (
    .clk, .rst_n, .sel, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .si, .so, .net_f(nf), .net_c(nc), .inst_f, .inst_c,
    .inst_rd_1(rd1), .inst_rd_2(rd2), .inst_rd_3(rd3),
    .inst_wr_1(wr1), .inst_wr_2(wr2), .inst_wr_3(wr3), .sib_open, .sib_mask
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // cycles spent inside CSUs and number of update pulses
  int csu_cycles = 0, updates = 0;
  logic in_csu = 1'b0;
  always @(posedge clk) begin
    if (cap || in_csu) csu_cycles++;
    if (upd) updates++;
    if (cap) in_csu <= 1'b1;
    if (upd) in_csu <= 1'b0;
  end

  // model: length of one CSU for a given set of open SIBs {SIB4,SIB3,SIB2,SIB1}
  function automatic int csu_len(input logic [3:0] op);
    int n = 1 + 5;                                   // capture, SIB2
    if (op[1]) begin
      n += 5 + (op[3] ? 1 + L3 : 0);                 // SIB4, R3
      n += 5 + (op[2] ? 1 + L2 : 0);                 // SIB3, R2
    end
    n += 5 + (op[0] ? 1 + L1 : 0);                   // SIB1, R1
    return n + 1 + 1;                                // end of map, update
  endfunction

  task automatic bus_write(input logic a, input logic [31:0] d);
    @(negedge clk);
    bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_we = 1'b0;
  endtask

  task automatic bus_read(input logic a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a;
    #1 d = bus_rdata;
  endtask

  logic [31:0] st;

  task automatic run_cmd(input im_op_e o, input int ia, input bit close_after);
    logic [31:0] c;
    c = '0;
    c[CMD_IA_LSB +: 8] = 8'(ia);
    c[CMD_OP_LSB +: 3] = o;
    c[CMD_CLOSE_AFTER] = close_after;
    c[CMD_START] = 1'b1;
    c[CMD_ACK_LO] = 1'b1;
    csu_cycles = 0; updates = 0;
    bus_write(1'b0, c);
    do bus_read(1'b0, st); while (st[ST_BUSY]);
  endtask

  task automatic ack(input bit hi, input bit lo);
    logic [31:0] c = '0;
    c[CMD_ACK_HI] = hi;
    c[CMD_ACK_LO] = lo;
    bus_write(1'b0, c);
  endtask

  task automatic wait_idle();
    int n = 0;
    repeat (4) @(posedge clk);
    do begin bus_read(1'b0, st); n++; end while (st[ST_BUSY] && n < 5000);
  endtask

  logic [31:0] d, exp_w;
  int exp_cyc;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd1 = $urandom; rd2 = 16'($urandom); rd3 = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. read R2 from reset: open SIB2, then SIB3, then read
    run_cmd(OP_READ, 4, 1'b0);
    bus_read(1'b1, d);
    check(st[ST_DONE] && !st[ST_ERROR] && !st[ST_ABORTED], "read R2 status");
    check(d == {16'h0, rd2}, $sformatf("read R2 data %h exp %h", d, rd2));
    exp_cyc = csu_len(4'b0000) + csu_len(4'b0010) + csu_len(4'b0110);
    check(updates == 3, $sformatf("read R2 CSUs %0d", updates));
    check(csu_cycles == exp_cyc, $sformatf("read R2 cycles %0d exp %0d", csu_cycles, exp_cyc));
    check(sib_open == 4'b0110, "read R2 leaves SIB2, SIB3 open");
    check(irq_lo && !irq_hi, "completion raises low-priority irq only");

    // 2. write R1: retarget from {SIB2,SIB3} to {SIB1}
    exp_w = $urandom;
    bus_write(1'b1, exp_w);
    run_cmd(OP_WRITE, 6, 1'b0);
    exp_cyc = csu_len(4'b0110) + csu_len(4'b0001);
    check(wr1 == exp_w, "write R1 data reaches instrument");
    check(wr2 == '0, "registers passed on the way are loaded with zeros");
    check(updates == 2 && csu_cycles == exp_cyc, $sformatf("write R1 %0d CSUs %0d cycles exp %0d", updates, csu_cycles, exp_cyc));
    check(sib_open == 4'b0001, "write R1 leaves only SIB1 open");

    // 3. open path to R3
    run_cmd(OP_OPEN, 2, 1'b0);
    exp_cyc = csu_len(4'b0001) + csu_len(4'b0010) + csu_len(4'b1010);
    check(updates == 3 && csu_cycles == exp_cyc, $sformatf("open R3 %0d CSUs %0d cycles exp %0d", updates, csu_cycles, exp_cyc));
    check(sib_open == 4'b1010, "open R3 leaves SIB2, SIB4 open");

    // 4. close all: the deepest SIB closes first
    run_cmd(OP_CLOSE_ALL, 0, 1'b0);
    exp_cyc = csu_len(4'b1010) + csu_len(4'b0010);
    check(updates == 2 && csu_cycles == exp_cyc, $sformatf("close all %0d CSUs %0d cycles exp %0d", updates, csu_cycles, exp_cyc));
    check(sib_open == 4'b0000 && st[ST_DONE], "close all closes every SIB");

    // 5. mask SIB3 (address 3), then a fault in I2 must not reach the top
    bus_write(1'b1, 32'h1);
    run_cmd(OP_SET_X, 3, 1'b0);
    check(sib_mask == 4'b0100, "SET_X sets X of SIB3 only");
    check(updates == 2, "SET_X needs SIB2 opened first");
    inst_f[1] = 1'b1; inst_c[1] = 1'b0;
    repeat (20) @(posedge clk);
    check(!nf && !irq_hi, "masked fault is not propagated");
    ack(1'b0, 1'b1);
    // unmask: the fault appears, localization runs by itself
    bus_write(1'b1, 32'h0);
    run_cmd(OP_SET_X, 3, 1'b0);
    wait_idle();
    check(irq_hi, "uncorrected fault raises high-priority irq");
    check(st[ST_LOC_VALID] && st[ST_LOC_ADDR_LSB +: 8] == 8'd4, $sformatf("localized I2 at R2 (addr %0d)", st[ST_LOC_ADDR_LSB +: 8]));
    check(sib_open == 4'b0110, "localization opened SIB2 and SIB3");
    inst_f[1] = 1'b0; inst_c[1] = 1'b1;
    repeat (5) @(posedge clk);
    ack(1'b1, 1'b1);

    // 6. an uncorrected fault in I1 while reading R1 aborts the read
    fork
      run_cmd(OP_READ, 6, 1'b0);
      begin
        @(posedge cap);
        repeat (3) @(posedge clk);
        inst_f[0] = 1'b1; inst_c[0] = 1'b0;
      end
    join
    wait_idle();
    check(st[ST_ABORTED] && st[ST_DONE], "access aborted by fault");
    check(st[ST_LOC_VALID] && st[ST_LOC_ADDR_LSB +: 8] == 8'd6, "localized I1 at R1 after abort");
    check(sib_open == 4'b0001, "localization closed SIB2/SIB3, kept SIB1");
    inst_f[0] = 1'b0; inst_c[0] = 1'b1;
    repeat (5) @(posedge clk);
    ack(1'b1, 1'b1);

    // 7. corrected fault: low-priority irq, no localization
    inst_f[2] = 1'b1; inst_c[2] = 1'b1;
    repeat (10) @(posedge clk);
    bus_read(1'b0, st);
    check(irq_lo && !irq_hi, "corrected fault raises low-priority irq only");
    check(st[ST_TOP_F] && st[ST_TOP_C] && !st[ST_BUSY], "corrected fault: F=1 C=1, IM idle");
    inst_f[2] = 1'b0;
    ack(1'b0, 1'b1);

    // 8. rejected commands
    run_cmd(OP_READ, 0, 1'b0);
    check(st[ST_ERROR] && updates == 0, "read of a SIB address is rejected");
    run_cmd(OP_SET_X, 6, 1'b0);
    check(st[ST_ERROR], "SET_X on a register is rejected");
    run_cmd(OP_READ, 9, 1'b0);
    check(st[ST_ERROR], "address past the map is rejected");

    // 9. read R3 and close the network afterwards
    rd3 = $urandom;
    run_cmd(OP_READ, 3 - 1, 1'b1);
    bus_read(1'b1, d);
    check(d == rd3, "read R3 with close-after returns data");
    check(sib_open == 4'b0000 && st[ST_DONE] && !st[ST_ERROR], "close-after closes the network");

    // 10. two simultaneous faults: the deeper-in-order one (I1) is reported,
    //     after clearing it the other (I2) is found by a new localization
    ack(1'b1, 1'b1);
    inst_f[0] = 1'b1; inst_c[0] = 1'b0;
    inst_f[1] = 1'b1; inst_c[1] = 1'b0;
    wait_idle();
    check(st[ST_LOC_VALID] && st[ST_LOC_ADDR_LSB +: 8] == 8'd6, "two faults: first localized is I1");
    inst_f[0] = 1'b0; inst_c[0] = 1'b1;
    repeat (5) @(posedge clk);
    bus_read(1'b0, st);
    check(st[ST_TOP_F] && !st[ST_TOP_C], "top flags still show the remaining fault");
    ack(1'b1, 1'b1);
    wait_idle();
    check(st[ST_LOC_VALID] && st[ST_LOC_ADDR_LSB +: 8] == 8'd4, "two faults: second localized is I2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

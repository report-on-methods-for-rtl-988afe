// tb_fmi_subsystem: end-to-end test of the fault management subsystem at its
// default sizes (registers of 32, 16 and 32 bits). Each instrument is a
// loop-back model: it returns the last value written to it, XORed with a
// per-instrument constant. The test writes and reads back every instrument
// register through the software interface, checks the cycle count of the
// first access from reset, then raises an uncorrected fault in each
// instrument in turn and checks that the manager localizes it to the right
// address and raises the high-priority interrupt.
module tb_fmi_subsystem;
  import ijtag_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bus_we = 1'b0, bus_addr = 1'b0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic irq_hi, irq_lo;
  logic [2:0] inst_f = '0, inst_c = '1;
  logic [31:0] wr1, wr3;
  logic [15:0] wr2;
  logic [3:0] sib_open, sib_mask;

  localparam logic [31:0] K1 = 32'h1111_0001, K3 = 32'h3333_0003;
  localparam logic [15:0] K2 = 16'h2002;

  fmi_subsystem dut (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq_hi, .irq_lo,
    .inst_f, .inst_c, .inst_rd_1(wr1 ^ K1), .inst_rd_2(wr2 ^ K2), .inst_rd_3(wr3 ^ K3),
    .inst_wr_1(wr1), .inst_wr_2(wr2), .inst_wr_3(wr3), .sib_open, .sib_mask
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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
  int cyc;
  task automatic run_cmd(input im_op_e o, input int ia);
    logic [31:0] c = '0;
    c[CMD_IA_LSB +: 8] = 8'(ia);
    c[CMD_OP_LSB +: 3] = o;
    c[CMD_START] = 1'b1;
    c[CMD_ACK_LO] = 1'b1;
    bus_write(1'b0, c);
    cyc = 0;
    do begin bus_read(1'b0, st); cyc++; end while (st[ST_BUSY]);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int addr_of [3] = '{6, 4, 2};
  logic [31:0] v, d, k;
  logic [31:0] mask;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // first access from reset: read R1 takes two CSUs:
    // (1+5+5+1+1) + (1+5+5+1+32+1+1) = 13 + 46 = 59 cycles of network activity,
    // plus the command hand-over; measured in bus polls of one cycle each
    run_cmd(OP_READ, 6);
    check(cyc >= 59 && cyc <= 63, $sformatf("first read of R1 took %0d cycles", cyc));

    for (int r = 0; r < 3; r++) begin
      for (int t = 0; t < 2; t++) begin
        v = $urandom;
        mask = (r == 1) ? 32'h0000_ffff : 32'hffff_ffff;
        k = (r == 0) ? K1 : (r == 1) ? {16'h0, K2} : K3;
        bus_write(1'b1, v);
        run_cmd(OP_WRITE, addr_of[r]);
        check(st[ST_DONE] && !st[ST_ERROR], $sformatf("write I%0d done", r + 1));
        run_cmd(OP_READ, addr_of[r]);
        bus_read(1'b1, d);
        check(d == ((v & mask) ^ k), $sformatf("I%0d read back %h expected %h", r + 1, d, (v & mask) ^ k));
      end
    end

    for (int r = 0; r < 3; r++) begin
      inst_f[r] = 1'b1; inst_c[r] = 1'b0;
      repeat (4) @(posedge clk);
      do bus_read(1'b0, st); while (st[ST_BUSY]);
      check(irq_hi, $sformatf("fault in I%0d raises irq_hi", r + 1));
      check(st[ST_LOC_VALID] && int'(st[ST_LOC_ADDR_LSB +: 8]) == addr_of[r],
            $sformatf("fault in I%0d localized at %0d", r + 1, st[ST_LOC_ADDR_LSB +: 8]));
      inst_f[r] = 1'b0; inst_c[r] = 1'b1;
      repeat (4) @(posedge clk);
      bus_write(1'b0, 32'h1 << CMD_ACK_HI);
    end

    run_cmd(OP_CLOSE_ALL, 0);
    check(sib_open == 4'b0000, "network closed at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fcx_sib: self-checking test of one FCX-SIB with a 3-bit child register
// modelled in the testbench. Checks the captured F and C flags (after the
// two-stage synchronizer), the shift order F, C, X, S at the scan output, the
// update of S and X, the scan path length with the SIB closed (4) and open
// (4 + 3), the flag propagation equations with and without the mask, and that
// nothing moves while sel is low.
module tb_fcx_sib;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sel = 1'b1, cap = 1'b0, sh = 1'b0, upd = 1'b0, si = 1'b0;
  logic so, tsi, child_sel, f_out, c_out, s_state, x_state;
  logic f_child = 1'b0, c_child = 1'b1, f_prev = 1'b0, c_prev = 1'b1;
  logic [2:0] child = '0;
  logic fso;

  fcx_sib dut (
    .clk, .rst_n, .sel, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .si, .so, .tsi, .fso, .child_sel, .f_child, .c_child, .f_prev, .c_prev,
    .f_out, .c_out, .s_state, .x_state
  );

  // child segment: 3-bit shift register, tsi in, fso out
  always_ff @(posedge clk) if (child_sel && sh) child <= {tsi, child[2:1]};
  assign fso = child[0];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_cap();
    @(negedge clk) cap = 1'b1; @(negedge clk) cap = 1'b0;
  endtask
  task automatic pulse_upd();
    @(negedge clk) upd = 1'b1; @(negedge clk) upd = 1'b0;
  endtask
  // shift one bit in, return the bit that was at so
  task automatic shift1(input logic b, output logic o);
    @(negedge clk);
    sh = 1'b1; si = b;
    #1 o = so;
    @(negedge clk);
    sh = 1'b0;
  endtask

  // measure path length: flush zeros, shift a single 1, count clocks until it shows
  task automatic path_len(output int n);
    logic o;
    for (int i = 0; i < 12; i++) shift1(1'b0, o);
    n = -1;
    for (int i = 0; i < 12; i++) begin
      shift1(i == 0, o);
      if (o && n < 0) n = i;
    end
  endtask

  logic o;
  logic [3:0] got;
  int n;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(so == 1'b0 && !s_state && !x_state, "reset: closed, unmasked");
    check(!f_out && c_out, "reset: no fault at the output");

    // uncorrected fault in the child
    f_child = 1'b1; c_child = 1'b0;
    #1 check(f_out && !c_out, "fault propagates without a clock");
    repeat (3) @(posedge clk);
    pulse_cap();
    // shift F, C, X, S out while shifting in F=0 C=0 X=1 S=1
    shift1(1'b0, got[0]);
    shift1(1'b0, got[1]);
    shift1(1'b1, got[2]);
    shift1(1'b1, got[3]);
    check(got == 4'b0001, $sformatf("captured F,C,X,S = %b (out order F first)", got));
    check(!s_state, "S changes only on update");
    pulse_upd();
    check(s_state && x_state && child_sel, "update opens and masks the SIB");
    #1 check(!f_out && c_out, "mask hides the child fault");
    f_prev = 1'b1; c_prev = 1'b1;
    #1 check(f_out && c_out, "flags of the previous SIB pass through");
    f_prev = 1'b0; c_prev = 1'b1;

    path_len(n);
    check(n == 7, $sformatf("open path length %0d, expected 7", n));

    // sel low: nothing changes
    sel = 1'b0;
    pulse_cap();
    pulse_upd();
    check(s_state && x_state, "sel low: update ignored");
    sel = 1'b1;

    // close and unmask: shift 4 bits F,C,X=0,S=0 after flushing the child
    f_child = 1'b1; c_child = 1'b1;
    for (int i = 0; i < 7; i++) shift1(1'b0, o);
    pulse_upd();
    check(!s_state && !x_state && !child_sel, "update closes the SIB");
    #1 check(f_out && c_out, "corrected fault shows F=1 C=1");
    path_len(n);
    check(n == 4, $sformatf("closed path length %0d, expected 4", n));
    repeat (3) @(posedge clk);
    pulse_cap();
    shift1(1'b0, got[0]);
    shift1(1'b0, got[1]);
    check(got[1:0] == 2'b11, "captured corrected fault F=1 C=1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

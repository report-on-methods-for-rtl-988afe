// tb_net_fig34: self-checking test of the multi-branch example network for
// the three sets of register lengths of the example: A (I0 = 20, I2 = 100),
// B (I2 = 70) and C (I0 = 50). Each instance runs in its own checker
// (net_fig34_check), which measures the total clock cycles of the four ways
// of reaching I4 and compares them with the stated access times: A 189, 169,
// 149, 124; B 159, 139, 149, 124; C 249, 229, 239, 244. It also checks every
// captured bit and register value against a model over random accesses.
// A watchdog ends the test if the checkers do not finish.
module tb_net_fig34;
  int ca, fa, cb, fb, cc, fc;
  logic da, db, dc;
  logic clk = 1'b0;
  always #5 clk = ~clk;   // watchdog clock, same period as the checkers'

  net_fig34_check #(.L0(20), .L2(100), .E0(189), .E1(169), .E2(149), .E3(124)) u_a (ca, fa, da);
  net_fig34_check #(.L0(20), .L2(70),  .E0(159), .E1(139), .E2(149), .E3(124)) u_b (cb, fb, db);
  net_fig34_check #(.L0(50), .L2(100), .E0(249), .E1(229), .E2(239), .E3(244)) u_c (cc, fc, dc);

  initial begin
    fork
      wait (da && db && dc);
      repeat (200000) @(posedge clk);
    join_any
    if (!(da && db && dc)) $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc,
             fa + fb + fc + ((da && db && dc) ? 0 : 1));
    $finish;
  end
endmodule

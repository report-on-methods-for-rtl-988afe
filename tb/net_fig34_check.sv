// net_fig34_check: checker for one instance of the multi-branch network,
// used three times by tb_net_fig34. It builds the network with the given I0
// and I2 lengths and keeps a reference model of the path (I0, C0, then the
// branch chosen by C0 with the instruments whose control bit is 0) and of
// every register. First it runs the four configuration sequences that reach
// I4 from the all-zero reset state (C0=01; C0=01 with C3=1; via branch 10 and
// C2; via branches 11 and 10 with C1 and C2) and checks the clock cycles
// counted on the scan controls against E0..E3 and that the last access wrote
// I4. Then it runs random accesses with $urandom data and control values and
// checks every captured bit and every register after each update. Results
// come out on checks/failures; done rises at the end.
module net_fig34_check #(
  parameter int L0 = 20,
  parameter int L2 = 100,
  parameter int E0 = 189,
  parameter int E1 = 169,
  parameter int E2 = 149,
  parameter int E3 = 124
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int L1 = 50, L3 = 20, L4 = 20, L5 = 5;
  localparam int LEN[10] = '{L0, L1, L2, L3, L4, L5, 2, 1, 1, 1}; // I0..I5, C0..C3
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, tdi = 1'b0, tdo;
  logic [L4-1:0] i4;
  logic [4:0] cfg;

  net_fig34 #(.L0(L0), .L2(L2)) dut (.clk, .rst_n, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .tdi, .tdo, .i4_upd(i4), .cfg);

  initial begin checks = 0; failures = 0; done = 1'b0; end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  // clock cycles spent in scan accesses
  int cyc = 0;
  always_ff @(posedge clk) if (cap || sh || upd) cyc <= cyc + 1;

  logic [127:0] mval [10];

  function automatic logic [127:0] dut_val(input int id);
    case (id)
      0: return 128'(dut.u_i0.update_data);
      1: return 128'(dut.u_i1.update_data);
      2: return 128'(dut.u_i2.update_data);
      3: return 128'(dut.u_i3.update_data);
      4: return 128'(i4);
      5: return 128'(dut.u_i5.update_data);
      6: return 128'(cfg[1:0]);
      7: return 128'(cfg[2]);
      8: return 128'(cfg[3]);
      default: return 128'(cfg[4]);
    endcase
  endfunction

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // one capture-shift-update access; control registers on the path take
  // the values n_c0..n_c3, instruments on the path get random data
  task automatic csu(input logic [1:0] n_c0, input logic n_c1, n_c2, n_c3);
    int ids[$];
    logic [255:0] vin, vexp, out;
    logic [127:0] nv [10];
    int off = 0, n;
    ids.push_back(0); ids.push_back(6);
    case (mval[6][1:0])
      2'b00: ids.push_back(9);
      2'b01: begin
        ids.push_back(4);
        if (!mval[9][0]) ids.push_back(3);
        if (!mval[8][0]) ids.push_back(2);
      end
      2'b10: begin
        ids.push_back(5); ids.push_back(8);
        if (!mval[7][0]) ids.push_back(1);
      end
      default: ids.push_back(7);
    endcase
    for (int k = 0; k < 6; k++) nv[k] = rnd128();
    nv[6] = 128'(n_c0); nv[7] = 128'(n_c1); nv[8] = 128'(n_c2); nv[9] = 128'(n_c3);
    vin = '0; vexp = '0;
    foreach (ids[j]) begin
      for (int b = 0; b < LEN[ids[j]]; b++) begin
        vin[off + b] = nv[ids[j]][b];
        vexp[off + b] = mval[ids[j]][b];
      end
      off += LEN[ids[j]];
    end
    n = off;
    out = '0;
    @(negedge clk) cap = 1'b1;
    @(negedge clk) cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < n; i++) begin out[i] = tdo; tdi = vin[i]; @(negedge clk); end
    sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
    check(out == vexp, $sformatf("cfg %b: %0d-bit capture mismatch", cfg, n));
    foreach (ids[j]) begin
      mval[ids[j]] = '0;
      for (int b = 0; b < LEN[ids[j]]; b++) mval[ids[j]][b] = nv[ids[j]][b];
    end
    for (int k = 0; k < 10; k++)
      check(dut_val(k) == mval[k], $sformatf("register %0d after update", k));
  endtask

  task automatic reset_net();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 10; k++) mval[k] = '0;
    check(cfg == 5'b0, "reset clears all control bits");
  endtask

  // sequences of control settings; the last access reads/writes I4
  task automatic sequence_to_i4(input int plan, input int expected);
    int c_start;
    logic [L4-1:0] w;
    reset_net();
    c_start = cyc;
    case (plan)
      0: csu(2'b01, 0, 0, 0);
      1: csu(2'b01, 0, 0, 1);
      2: begin csu(2'b10, 0, 0, 1); csu(2'b01, 0, 1, 1); end
      default: begin csu(2'b11, 0, 0, 1); csu(2'b10, 1, 0, 1); csu(2'b01, 1, 1, 1); end
    endcase
    csu(2'b01, mval[7][0], mval[8][0], mval[9][0]);
    w = L4'(mval[4]);
    @(negedge clk);
    check(i4 == w, "final access wrote I4");
    check(cyc - c_start == expected,
          $sformatf("plan %0d: %0d cycles, expected %0d", plan, cyc - c_start, expected));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    sequence_to_i4(0, E0);
    sequence_to_i4(1, E1);
    sequence_to_i4(2, E2);
    sequence_to_i4(3, E3);
    reset_net();
    for (int k = 0; k < 60; k++)
      csu(2'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    done = 1'b1;
  end
endmodule

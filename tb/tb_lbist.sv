// tb_lbist: runs the LBIST controller on a 2-chain loop-back model (two shift
// registers of 5 and 3 bits that capture the inverted value of their first
// bit, and hold while the LBIST is idle). It checks the scan_en schedule and total cycle count
// ((n + 1) * shift_len + n), recomputes the expected signature with its own
// PRPG/MISR model, checks pass with the right golden value and fail with a
// wrong one.
module tb_lbist;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done, pass, scan_en;
  logic [31:0] seed, golden, sig;
  logic [15:0] n_pat, slen;
  logic [1:0] si, so;
  logic [4:0] c0;
  logic [2:0] c1;

  lbist #(.CHAINS(2)) dut (
    .clk, .rst_n, .start, .seed, .n_patterns(n_pat), .shift_len(slen), .golden,
    .busy, .done, .pass, .signature(sig), .scan_en, .chain_si(si), .chain_so(so)
  );

  // circuit under test: two chains
  always_ff @(posedge clk) begin
    if (scan_en) begin
      c0 <= {c0[3:0], si[0]};
      c1 <= {c1[1:0], si[1]};
    end else if (busy) begin
      c0 <= c0 ^ {4'b0, ~c0[0]} ^ {c0[3:0], 1'b0};
      c1 <= {c1[1:0], ~c1[2]};
    end
  end
  assign so = {c1[2], c0[4]};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] step(input logic [31:0] v);
    return {v[30:0], 1'b0} ^ (v[31] ? 32'h0040_0007 : 32'h0);
  endfunction

  // independent model of one complete run
  function automatic logic [31:0] model(input logic [31:0] sd, input int n, input int sl,
                                        input logic [4:0] i0, input logic [2:0] i1);
    logic [31:0] p = (sd == 0) ? 32'h1 : sd;
    logic [31:0] m = '0;
    logic [4:0] a = i0;
    logic [2:0] b = i1;
    for (int k = 0; k <= n; k++) begin
      for (int s = 0; s < sl; s++) begin
        m = step(m) ^ {30'b0, b[2], a[4]};
        a = {a[3:0], p[0]};
        b = {b[1:0], p[1]};
        p = step(p);
      end
      if (k < n) begin
        a = a ^ {4'b0, ~a[0]} ^ {a[3:0], 1'b0};
        b = {b[1:0], ~b[2]};
      end
    end
    return m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, nse;
  logic [31:0] exp_sig;

  initial begin
    c0 = '0; c1 = '0;
    seed = 32'hACE1_1234; n_pat = 16'd20; slen = 16'(L); golden = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      exp_sig = model(seed, int'(n_pat), int'(slen), c0, c1);
      golden = (run == 1) ? ~exp_sig : exp_sig;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 0; nse = 0;
      while (busy) begin
        cyc++;
        if (scan_en) nse++;
        @(negedge clk);
      end
      check(cyc == (int'(n_pat) + 1) * int'(slen) + int'(n_pat), $sformatf("run %0d took %0d cycles", run, cyc));
      check(nse == (int'(n_pat) + 1) * int'(slen), "shift cycle count");
      check(done, "done after the run");
      check(sig == exp_sig, $sformatf("signature %h expected %h", sig, exp_sig));
      check(pass == (run != 1), "pass only with the right golden signature");
      seed = $urandom; n_pat = 16'($urandom_range(1, 30));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

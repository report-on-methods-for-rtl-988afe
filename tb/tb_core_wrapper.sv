// tb_core_wrapper: random test of the core wrapper (5 input and 7 output
// cells) against a cycle model of the two chains. The model applies the mode
// rules directly: functional (both chains capture unless scan_en), INTEST
// (input chain always shifts, output chain captures core_out unless scan_en,
// po forced to 1 in safe mode) and EXTEST (output chain always shifts, input
// chain captures pi unless scan_en). It also checks isolation directly: in
// INTEST core_in never depends on pi, in EXTEST po never depends on core_out.
module tb_core_wrapper;
  localparam int NI = 5, NO = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic test_en, extest_en, scan_en, safe_en, sii, soi, sio, soo;
  logic [NI-1:0] pi, core_in, m_in;
  logic [NO-1:0] core_out, po, m_out;
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_safe = 0;

  core_wrapper #(.N_IN(NI), .N_OUT(NO)) dut (
    .clk, .test_en, .extest_en, .scan_en, .safe_en,
    .scan_in_i(sii), .scan_out_i(soi), .scan_in_o(sio), .scan_out_o(soo),
    .pi, .core_in, .core_out, .po
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic se_i, se_o, safe;
  logic [NI-1:0] ci_before;
  logic [NO-1:0] po_before;

  initial begin
    // load known contents: functional capture of pi/core_out
    test_en = 1'b0; extest_en = 1'b0; scan_en = 1'b0; safe_en = 1'b0;
    sii = 1'b0; sio = 1'b0; pi = '0; core_out = '0;
    @(posedge clk);
    m_in = '0; m_out = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 25 == 0) begin
        {test_en, extest_en, safe_en} = 3'($urandom);
      end
      scan_en = ($urandom_range(0, 3) != 0);
      sii = 1'($urandom); sio = 1'($urandom);
      pi = NI'($urandom); core_out = NO'($urandom);
      se_i = test_en ? (extest_en ? scan_en : 1'b1) : scan_en;
      se_o = test_en ? (extest_en ? 1'b1 : scan_en) : scan_en;
      safe = test_en && !extest_en && safe_en;
      #1;
      checks++;
      if (core_in != m_in || po != (safe ? {NO{1'b1}} : m_out) ||
          soi != m_in[NI-1] || soo != m_out[NO-1]) begin
        failures++;
        $display("FAIL: t=%0d core_in %b/%b po %b/%b", t, core_in, m_in, po, m_out);
      end
      // isolation: wiggle the isolated side within the cycle
      ci_before = core_in; po_before = po;
      pi = ~pi; core_out = ~core_out;
      #1;
      if (test_en && !extest_en) begin
        checks++;
        if (core_in != ci_before) begin failures++; $display("FAIL: INTEST core_in follows pi"); end
      end
      if (test_en && extest_en) begin
        checks++;
        if (po != po_before) begin failures++; $display("FAIL: EXTEST po follows core_out"); end
      end
      pi = ~pi; core_out = ~core_out;
      n_mode[test_en ? (extest_en ? 2 : 1) : 0]++;
      if (safe) n_safe++;
      @(posedge clk);
      m_in  = se_i ? {m_in[NI-2:0], sii} : pi;
      m_out = se_o ? {m_out[NO-2:0], sio} : core_out;
    end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_safe == 0) begin
      failures++;
      $display("FAIL: a mode never ran: func %0d intest %0d extest %0d safe %0d", n_mode[0], n_mode[1], n_mode[2], n_safe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

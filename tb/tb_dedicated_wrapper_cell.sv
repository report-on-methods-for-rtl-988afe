// tb_dedicated_wrapper_cell: random test of the dedicated wrapper cell against
// a model of its four modes: functional pass-through (capture_en = 0, the
// flip-flop captures cfi), hold/drive (capture_en = 1, shift_en = 0), shift
// (shift_en = 1), and the safe value on cfo.
module tb_dedicated_wrapper_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic shift_en, capture_en, safe_ctrl, safe_value, cti, cfi, cto, cfo;
  logic m_ff;
  int checks = 0, failures = 0;
  int n_shift = 0, n_hold = 0, n_func = 0, n_safe = 0;

  dedicated_wrapper_cell dut (.shift_clk(clk), .shift_en, .capture_en, .safe_ctrl,
                              .safe_value, .cti, .cfi, .cto, .cfo);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialize the flip-flop by one shift
    shift_en = 1'b1; capture_en = 1'b0; safe_ctrl = 1'b0; safe_value = 1'b0;
    cti = 1'b0; cfi = 1'b0;
    @(posedge clk);
    m_ff = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      {shift_en, capture_en, safe_ctrl, safe_value, cti, cfi} = 6'($urandom);
      #1;
      checks++;
      if (cto != m_ff ||
          cfo != (safe_ctrl ? safe_value : (capture_en ? m_ff : cfi))) begin
        failures++;
        $display("FAIL: t=%0d se=%b ce=%b cto=%b cfo=%b model ff=%b", t, shift_en, capture_en, cto, cfo, m_ff);
      end
      if (safe_ctrl) n_safe++;
      if (shift_en) n_shift++;
      else if (capture_en) n_hold++;
      else n_func++;
      @(posedge clk);
      m_ff = shift_en ? cti : (capture_en ? m_ff : cfi);
    end
    checks++;
    if (n_shift == 0 || n_hold == 0 || n_func == 0 || n_safe == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_opt_wrapper_cell: random test of the optimized wrapper cell (scan
// flip-flop, cfo = Q | safe_ctrl) with and without the safe gate.
module tb_opt_wrapper_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic shift_en, safe_ctrl, cti, cfi;
  logic cto_s, cfo_s, cto_n, cfo_n;
  logic m_q;
  int checks = 0, failures = 0;

  opt_wrapper_cell #(.SAFE(1'b1)) dut_s (.shift_clk(clk), .shift_en, .safe_ctrl, .cti, .cfi, .cto(cto_s), .cfo(cfo_s));
  opt_wrapper_cell #(.SAFE(1'b0)) dut_n (.shift_clk(clk), .shift_en, .safe_ctrl, .cti, .cfi, .cto(cto_n), .cfo(cfo_n));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift_en = 1'b1; safe_ctrl = 1'b0; cti = 1'b0; cfi = 1'b0;
    @(posedge clk);
    m_q = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      {shift_en, safe_ctrl, cti, cfi} = 4'($urandom);
      #1;
      checks++;
      if (cto_s != m_q || cfo_s != (m_q | safe_ctrl) || cto_n != m_q || cfo_n != m_q) begin
        failures++;
        $display("FAIL: t=%0d q=%b cfo=%b/%b model %b safe=%b", t, cto_s, cfo_s, cfo_n, m_q, safe_ctrl);
      end
      @(posedge clk);
      m_q = shift_en ? cti : cfi;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

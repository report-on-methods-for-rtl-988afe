// tb_shared_wrapper_cell: random test of the shared wrapper cell against a
// model: capture_en = 0 acts as a functional flip-flop on cfi; capture_en = 1
// shifts cti (shift_en = 1) or holds (shift_en = 0); cfo = cto = flip-flop.
module tb_shared_wrapper_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic shift_en, capture_en, cti, cfi, cto, cfo;
  logic m_q;
  int checks = 0, failures = 0;

  shared_wrapper_cell dut (.shift_clk(clk), .shift_en, .capture_en, .cti, .cfi, .cto, .cfo);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift_en = 1'b0; capture_en = 1'b0; cti = 1'b0; cfi = 1'b1;
    @(posedge clk);
    m_q = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      {shift_en, capture_en, cti, cfi} = 4'($urandom);
      #1;
      checks++;
      if (cto != m_q || cfo != m_q) begin
        failures++;
        $display("FAIL: t=%0d q=%b model %b", t, cto, m_q);
      end
      @(posedge clk);
      m_q = capture_en ? (shift_en ? cti : m_q) : cfi;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

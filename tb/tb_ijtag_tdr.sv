// tb_ijtag_tdr: self-checking test of the test data register (LEN = 8):
// capture then shift out least significant bit first, shift in a new value
// and update it, and no action while sel is low.
module tb_ijtag_tdr;
  localparam int LEN = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sel = 1'b1, cap = 1'b0, sh = 1'b0, upd = 1'b0, si = 1'b0, so;
  logic [LEN-1:0] cdata = '0, udata;

  ijtag_tdr #(.LEN(LEN)) dut (
    .clk, .rst_n, .sel, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .si, .so, .capture_data(cdata), .update_data(udata)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [LEN-1:0] got, newv, prev;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(udata == '0 && so == 1'b0, "reset clears both stages");
    for (int t = 0; t < 4; t++) begin
      cdata = LEN'($urandom);
      newv  = LEN'($urandom);
      prev  = udata;
      @(negedge clk) cap = 1'b1;
      @(negedge clk) cap = 1'b0;
      for (int i = 0; i < LEN; i++) begin
        got[i] = so;
        si = newv[i];
        sh = 1'b1;
        @(negedge clk);
      end
      sh = 1'b0;
      check(got == cdata, $sformatf("captured %h read %h", cdata, got));
      check(udata == prev, "update stage unchanged before update");
      @(negedge clk) upd = 1'b1;
      @(negedge clk) upd = 1'b0;
      check(udata == newv, $sformatf("updated %h expected %h", udata, newv));
    end
    // deselected: nothing happens
    sel = 1'b0;
    @(negedge clk) cap = 1'b1; cdata = ~udata;
    @(negedge clk) cap = 1'b0; sh = 1'b1; si = 1'b1;
    @(negedge clk) sh = 1'b0; upd = 1'b1;
    @(negedge clk) upd = 1'b0;
    check(udata == newv, "sel low: no capture, shift or update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

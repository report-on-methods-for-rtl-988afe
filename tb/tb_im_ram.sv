// tb_im_ram: checks reset values (closed, unmasked, C=1, F=0), writes and
// reads of every word against a testbench copy, and the S-bit vector.
module tb_im_ram;
  import ijtag_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  ram_word_t wdata = '0, rdata;
  logic [DEPTH-1:0] s_bits;
  ram_word_t model [DEPTH];

  im_ram #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .s_bits);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DEPTH-1:0] exp_s;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 4'b0100;
      raddr = 8'(i);
      #1 check(rdata == 4'b0100, $sformatf("reset word %0d = %b", i, rdata));
    end
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 8'($urandom_range(0, DEPTH - 1));
      wdata = 4'($urandom);
      model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      raddr = 8'($urandom_range(0, DEPTH - 1));
      #1 check(rdata == model[raddr], $sformatf("word %0d = %b expected %b", raddr, rdata, model[raddr]));
      for (int i = 0; i < DEPTH; i++) exp_s[i] = model[i].s;
      check(s_bits == exp_s, "S bit vector");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_im_rom: checks the default network map against the example network
// table (node type and offset/length of every word) and that addresses past
// the map read as end-of-map.
module tb_im_rom;
  import ijtag_pkg::*;
  logic [ADDR_W-1:0] addr;
  rom_word_t q;
  im_rom dut (.addr, .rdata(q));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected words, written out from the table: {type, offset/length}
  node_type_e et [8] = '{NODE_SIB, NODE_SIB, NODE_REG, NODE_SIB, NODE_REG, NODE_SIB, NODE_REG, NODE_END};
  int         el [8] = '{5, 2, 32, 2, 16, 2, 32, 0};

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      addr = 8'(i);
      #1;
      check(q.ntype == et[i] && int'(q.len) == el[i], $sformatf("word %0d = %b", i, q));
    end
    check(dut.INIT[9:0] == 10'b0000010100, "word 0 bits: offset 101, type 00");
    addr = 8'd200;
    #1 check(q.ntype == NODE_END, "past the map reads END");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// im_rom: network map ROM of the instrument manager.
//
// One 10-bit word per network node (see ijtag_pkg::rom_word_t), word 0 being
// the node next to the network scan output. The contents are the INIT
// parameter, word i in bits [i*10 +: 10]; the default is the map of the example
// network. Reads are combinational; an address at or past DEPTH reads as an
// end-of-map word, so a walk through the map always stops.
module im_rom
  import ijtag_pkg::*;
#(
  parameter int unsigned DEPTH = TABLE1_DEPTH,
  parameter logic [DEPTH*ROM_W-1:0] INIT = TABLE1_ROM
) (
  input  logic [ADDR_W-1:0] addr,
  output rom_word_t         rdata
);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  rom_word_t mem [DEPTH];

  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = INIT[i*ROM_W +: ROM_W];
  end

  always_comb begin
    if (int'(addr) < int'(DEPTH)) rdata = mem[addr[IW-1:0]];
    else begin
      rdata.ntype = NODE_END;
      rdata.len   = '0;
    end
  end
endmodule

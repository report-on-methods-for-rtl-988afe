// im_ram: network status RAM of the instrument manager.
//
// One 4-bit word per ROM address (see ijtag_pkg::ram_word_t: F, C, X, S) that
// records what the manager last wrote into and read from each SIB. Only SIB
// addresses are ever written. One synchronous write port, one combinational
// read port, and s_bits, the S bit of every word, from which the manager tells
// whether any SIB, or any SIB below a given one, is still open.
// Reset puts every word at the network's reset state: closed, unmasked, no
// fault (S=0, X=0, C=1, F=0). It is built from flip-flops because it must reset.
module im_ram
  import ijtag_pkg::*;
#(
  parameter int unsigned DEPTH = TABLE1_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  ram_word_t         wdata,
  input  logic [ADDR_W-1:0] raddr,
  output ram_word_t         rdata,
  output logic [DEPTH-1:0]  s_bits
);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  ram_word_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '{f: 1'b0, c: 1'b1, x: 1'b0, s: 1'b0};
    end else if (we && int'(waddr) < int'(DEPTH)) begin
      mem[waddr[IW-1:0]] <= wdata;
    end
  end

  always_comb begin
    if (int'(raddr) < int'(DEPTH)) rdata = mem[raddr[IW-1:0]];
    else rdata = '{f: 1'b0, c: 1'b1, x: 1'b0, s: 1'b0};
    for (int i = 0; i < int'(DEPTH); i++) s_bits[i] = mem[i].s;
  end
endmodule

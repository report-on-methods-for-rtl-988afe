// fmi_subsystem: the fault management hardware of one chip: an
// instrument_manager (with its network map ROM and status RAM) driving the
// example fmi_network. The manager's ROM holds the map of that network, so the
// instrument addresses used by software are: R1 = 6, R2 = 4, R3 = 2, and the
// SIBs are SIB2 = 0, SIB4 = 1, SIB3 = 3, SIB1 = 5.
// Ports: the manager's software interface and interrupts, and the instrument
// side of the network (flags, read data, written data). Network scan signals
// stay inside; the SIB states come out for observation.
module fmi_subsystem
  import ijtag_pkg::*;
#(
  parameter int unsigned LEN_R1 = 32,
  parameter int unsigned LEN_R2 = 16,
  parameter int unsigned LEN_R3 = 32,
  parameter int unsigned MAX_CSU = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_we,
  input  logic              bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              irq_hi,
  output logic              irq_lo,
  input  logic [2:0]        inst_f,
  input  logic [2:0]        inst_c,
  input  logic [LEN_R1-1:0] inst_rd_1,
  input  logic [LEN_R2-1:0] inst_rd_2,
  input  logic [LEN_R3-1:0] inst_rd_3,
  output logic [LEN_R1-1:0] inst_wr_1,
  output logic [LEN_R2-1:0] inst_wr_2,
  output logic [LEN_R3-1:0] inst_wr_3,
  output logic [3:0]        sib_open,
  output logic [3:0]        sib_mask
);
  localparam logic [TABLE1_DEPTH*ROM_W-1:0] MAP = {
    rom_entry(NODE_END, 0),
    rom_entry(NODE_REG, LEN_R1),
    rom_entry(NODE_SIB, 2),
    rom_entry(NODE_REG, LEN_R2),
    rom_entry(NODE_SIB, 2),
    rom_entry(NODE_REG, LEN_R3),
    rom_entry(NODE_SIB, 2),
    rom_entry(NODE_SIB, 5)
  };

  logic sel, cap, sh, upd, si, so, nf, nc;

  instrument_manager #(.DEPTH(TABLE1_DEPTH), .ROM_INIT(MAP), .MAX_CSU(MAX_CSU)) u_im (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq_hi, .irq_lo,
    .net_sel(sel), .net_capture(cap), .net_shift(sh), .net_update(upd),
    .net_si(si), .net_so(so), .net_f(nf), .net_c(nc)
  );

  fmi_network #(.LEN_R1(LEN_R1), .LEN_R2(LEN_R2), .LEN_R3(LEN_R3)) u_net (
    .clk, .rst_n, .sel, .capture_en(cap), .shift_en(sh), .update_en(upd),
    .si, .so, .net_f(nf), .net_c(nc), .inst_f, .inst_c,
    .inst_rd_1, .inst_rd_2, .inst_rd_3, .inst_wr_1, .inst_wr_2, .inst_wr_3, .sib_open, .sib_mask
  );
endmodule

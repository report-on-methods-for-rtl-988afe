// fmi_network: the example hierarchical IJTAG network with fault-flag
// propagation that the default network map ROM (ijtag_pkg::TABLE1_ROM)
// describes.
//
// Structure, from scan input to scan output:
//   si -> SIB1 [R1] -> SIB2 [ SIB3 [R2] -> SIB4 [R3] ] -> so
// where brackets hold a SIB's child segment. R1, R2 and R3 are the test data
// registers of instruments I1, I2 and I3 (32, 16 and 32 bits by default).
// ROM word numbers (instrument addresses), counted from the scan output:
// 0 SIB2, 1 SIB4, 2 R3, 3 SIB3, 4 R2, 5 SIB1, 6 R1.
//
// Each instrument drives a fault flag and a corrected flag (inst_f/inst_c,
// index 0..2 for I1..I3) into the SIB above its register. The flags gather
// along each segment and up the hierarchy through the FCX-SIBs; net_f/net_c
// are the top-level flags for the instrument manager. Instrument read data
// enters at inst_rd_* (captured by the register) and the written value leaves
// at inst_wr_*. All SIBs reset closed, so the reset scan path is 8 bits long.
// The structure and lengths follow the example map; the order of SIB1 and
// SIB2 on the top level and of SIB3 and SIB4 inside SIB2 follows from the map
// word order.
module fmi_network #(
  parameter int unsigned LEN_R1 = 32,
  parameter int unsigned LEN_R2 = 16,
  parameter int unsigned LEN_R3 = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  logic              capture_en,
  input  logic              shift_en,
  input  logic              update_en,
  input  logic              si,
  output logic              so,
  output logic              net_f,
  output logic              net_c,
  input  logic [2:0]        inst_f,
  input  logic [2:0]        inst_c,
  input  logic [LEN_R1-1:0] inst_rd_1,
  input  logic [LEN_R2-1:0] inst_rd_2,
  input  logic [LEN_R3-1:0] inst_rd_3,
  output logic [LEN_R1-1:0] inst_wr_1,
  output logic [LEN_R2-1:0] inst_wr_2,
  output logic [LEN_R3-1:0] inst_wr_3,
  output logic [3:0]        sib_open,  // S state of SIB1..SIB4 (bit 0 = SIB1)
  output logic [3:0]        sib_mask   // X state of SIB1..SIB4
);
  logic sib1_so, sib1_tsi, sib1_csel, sib1_f, sib1_c;
  logic sib2_tsi, sib2_csel;
  logic sib3_so, sib3_tsi, sib3_csel, sib3_f, sib3_c;
  logic sib4_so, sib4_tsi, sib4_csel, sib4_f, sib4_c;
  logic r1_so, r2_so, r3_so;

  // top level: SIB1 then SIB2
  fcx_sib u_sib1 (
    .clk, .rst_n, .sel, .capture_en, .shift_en, .update_en,
    .si(si), .so(sib1_so), .tsi(sib1_tsi), .fso(r1_so), .child_sel(sib1_csel),
    .f_child(inst_f[0]), .c_child(inst_c[0]), .f_prev(1'b0), .c_prev(1'b1),
    .f_out(sib1_f), .c_out(sib1_c), .s_state(sib_open[0]), .x_state(sib_mask[0])
  );

  ijtag_tdr #(.LEN(LEN_R1)) u_r1 (
    .clk, .rst_n, .sel(sib1_csel), .capture_en, .shift_en, .update_en,
    .si(sib1_tsi), .so(r1_so), .capture_data(inst_rd_1), .update_data(inst_wr_1)
  );

  fcx_sib u_sib2 (
    .clk, .rst_n, .sel, .capture_en, .shift_en, .update_en,
    .si(sib1_so), .so(so), .tsi(sib2_tsi), .fso(sib4_so), .child_sel(sib2_csel),
    .f_child(sib4_f), .c_child(sib4_c), .f_prev(sib1_f), .c_prev(sib1_c),
    .f_out(net_f), .c_out(net_c), .s_state(sib_open[1]), .x_state(sib_mask[1])
  );

  // child segment of SIB2: SIB3 then SIB4
  fcx_sib u_sib3 (
    .clk, .rst_n, .sel(sib2_csel), .capture_en, .shift_en, .update_en,
    .si(sib2_tsi), .so(sib3_so), .tsi(sib3_tsi), .fso(r2_so), .child_sel(sib3_csel),
    .f_child(inst_f[1]), .c_child(inst_c[1]), .f_prev(1'b0), .c_prev(1'b1),
    .f_out(sib3_f), .c_out(sib3_c), .s_state(sib_open[2]), .x_state(sib_mask[2])
  );

  ijtag_tdr #(.LEN(LEN_R2)) u_r2 (
    .clk, .rst_n, .sel(sib3_csel), .capture_en, .shift_en, .update_en,
    .si(sib3_tsi), .so(r2_so), .capture_data(inst_rd_2), .update_data(inst_wr_2)
  );

  fcx_sib u_sib4 (
    .clk, .rst_n, .sel(sib2_csel), .capture_en, .shift_en, .update_en,
    .si(sib3_so), .so(sib4_so), .tsi(sib4_tsi), .fso(r3_so), .child_sel(sib4_csel),
    .f_child(inst_f[2]), .c_child(inst_c[2]), .f_prev(sib3_f), .c_prev(sib3_c),
    .f_out(sib4_f), .c_out(sib4_c), .s_state(sib_open[3]), .x_state(sib_mask[3])
  );

  ijtag_tdr #(.LEN(LEN_R3)) u_r3 (
    .clk, .rst_n, .sel(sib4_csel), .capture_en, .shift_en, .update_en,
    .si(sib4_tsi), .so(r3_so), .capture_data(inst_rd_3), .update_data(inst_wr_3)
  );
endmodule

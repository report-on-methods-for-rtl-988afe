// net_fig26: example IEEE 1687 network with three SIBs and one ScanMux,
// reached from a TAP's TDI/TDO (the TAP controller is outside this module and
// supplies capture_en/shift_en/update_en).
//
//   tdi -> SIB1 [ TDR1 -> SIB2 [ TDR2 -> (TDR3 | TDR4) -> ScanMux -> S ] ]
//       -> SIB3 [ TDR5 ] -> tdo
// Brackets hold a SIB's child segment. TDR2 feeds both TDR3 and TDR4; the
// one-bit ScanMux control register S selects TDR3 (0) or TDR4 (1) and only the
// selected register receives the control signals. Eight configurations are
// possible. The structure is the example's; the register lengths are not
// given there and default to 4, 5, 6, 7 and 8 bits (TDR3 and TDR4 must differ
// for the ScanMux to be testable). Each TDR captures tdr_cap_k and drives
// tdr_upd_k. cfg reports {ScanMux select, SIB3, SIB2, SIB1}.
module net_fig26 #(
  parameter int unsigned L1 = 4,
  parameter int unsigned L2 = 5,
  parameter int unsigned L3 = 6,
  parameter int unsigned L4 = 7,
  parameter int unsigned L5 = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          capture_en,
  input  logic          shift_en,
  input  logic          update_en,
  input  logic          tdi,
  output logic          tdo,
  input  logic [L1-1:0] tdr_cap_1,
  input  logic [L2-1:0] tdr_cap_2,
  input  logic [L3-1:0] tdr_cap_3,
  input  logic [L4-1:0] tdr_cap_4,
  input  logic [L5-1:0] tdr_cap_5,
  output logic [L1-1:0] tdr_upd_1,
  output logic [L2-1:0] tdr_upd_2,
  output logic [L3-1:0] tdr_upd_3,
  output logic [L4-1:0] tdr_upd_4,
  output logic [L5-1:0] tdr_upd_5,
  output logic [3:0]    cfg
);
  logic sib1_so, sib1_tsi, sib1_cs;
  logic sib2_so, sib2_tsi, sib2_cs;
  logic sib3_tsi, sib3_cs;
  logic t1_so, t2_so, t3_so, t4_so, t5_so, mux_so;
  logic [1:0] mux_sel;
  logic [0:0] mux_select;

  sib u_sib1 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
              .si(tdi), .so(sib1_so), .tsi(sib1_tsi), .fso(sib2_so),
              .child_sel(sib1_cs), .asserted(cfg[0]));

  ijtag_tdr #(.LEN(L1)) u_tdr1 (.clk, .rst_n, .sel(sib1_cs), .capture_en, .shift_en, .update_en,
    .si(sib1_tsi), .so(t1_so), .capture_data(tdr_cap_1), .update_data(tdr_upd_1));

  sib u_sib2 (.clk, .rst_n, .sel(sib1_cs), .capture_en, .shift_en, .update_en,
              .si(t1_so), .so(sib2_so), .tsi(sib2_tsi), .fso(mux_so),
              .child_sel(sib2_cs), .asserted(cfg[1]));

  ijtag_tdr #(.LEN(L2)) u_tdr2 (.clk, .rst_n, .sel(sib2_cs), .capture_en, .shift_en, .update_en,
    .si(sib2_tsi), .so(t2_so), .capture_data(tdr_cap_2), .update_data(tdr_upd_2));

  ijtag_tdr #(.LEN(L3)) u_tdr3 (.clk, .rst_n, .sel(mux_sel[0]), .capture_en, .shift_en, .update_en,
    .si(t2_so), .so(t3_so), .capture_data(tdr_cap_3), .update_data(tdr_upd_3));

  ijtag_tdr #(.LEN(L4)) u_tdr4 (.clk, .rst_n, .sel(mux_sel[1]), .capture_en, .shift_en, .update_en,
    .si(t2_so), .so(t4_so), .capture_data(tdr_cap_4), .update_data(tdr_upd_4));

  scan_mux_ctrl #(.N(2)) u_mux (.clk, .rst_n, .sel(sib2_cs), .capture_en, .shift_en, .update_en,
    .seg_so({t4_so, t3_so}), .so(mux_so), .seg_sel(mux_sel), .select(mux_select));

  sib u_sib3 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
              .si(sib1_so), .so(tdo), .tsi(sib3_tsi), .fso(t5_so),
              .child_sel(sib3_cs), .asserted(cfg[2]));

  ijtag_tdr #(.LEN(L5)) u_tdr5 (.clk, .rst_n, .sel(sib3_cs), .capture_en, .shift_en, .update_en,
    .si(sib3_tsi), .so(t5_so), .capture_data(tdr_cap_5), .update_data(tdr_upd_5));

  assign cfg[3] = mux_select[0];
endmodule

// net_fig28b: example network #2 used to explain session selection:
//   tdi -> SIB1 [ TDR1 -> SIB2 [ TDR2 ] ] -> SIB3 [ TDR3 ] -> tdo
// TDR1 drives instrument I1 (i1_out); TDR2 and TDR3 capture instruments I2 and
// I3 (i2_in, i3_in) and their update values are brought out unused by the
// instruments. The network has six possible paths (SIB2 is only reachable
// while SIB1 is asserted). cfg reports {SIB3, SIB2, SIB1}. The TAP controller
// is outside and supplies capture_en/shift_en/update_en.
// The structure and the instrument directions are those of the example; the
// register lengths are not given and default to 3, 4 and 5 bits.
module net_fig28b #(
  parameter int unsigned L1 = 3,
  parameter int unsigned L2 = 4,
  parameter int unsigned L3 = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          capture_en,
  input  logic          shift_en,
  input  logic          update_en,
  input  logic          tdi,
  output logic          tdo,
  output logic [L1-1:0] i1_out,
  input  logic [L2-1:0] i2_in,
  input  logic [L3-1:0] i3_in,
  output logic [L2-1:0] tdr2_upd,
  output logic [L3-1:0] tdr3_upd,
  output logic [2:0]    cfg
);
  logic sib1_so, sib1_tsi, sib1_cs, sib2_so, sib2_tsi, sib2_cs, sib3_tsi, sib3_cs;
  logic t1_so, t2_so, t3_so;

  sib u_sib1 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
              .si(tdi), .so(sib1_so), .tsi(sib1_tsi), .fso(sib2_so),
              .child_sel(sib1_cs), .asserted(cfg[0]));

  ijtag_tdr #(.LEN(L1)) u_tdr1 (.clk, .rst_n, .sel(sib1_cs), .capture_en, .shift_en, .update_en,
    .si(sib1_tsi), .so(t1_so), .capture_data(i1_out), .update_data(i1_out));

  sib u_sib2 (.clk, .rst_n, .sel(sib1_cs), .capture_en, .shift_en, .update_en,
              .si(t1_so), .so(sib2_so), .tsi(sib2_tsi), .fso(t2_so),
              .child_sel(sib2_cs), .asserted(cfg[1]));

  ijtag_tdr #(.LEN(L2)) u_tdr2 (.clk, .rst_n, .sel(sib2_cs), .capture_en, .shift_en, .update_en,
    .si(sib2_tsi), .so(t2_so), .capture_data(i2_in), .update_data(tdr2_upd));

  sib u_sib3 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
              .si(sib1_so), .so(tdo), .tsi(sib3_tsi), .fso(t3_so),
              .child_sel(sib3_cs), .asserted(cfg[2]));

  ijtag_tdr #(.LEN(L3)) u_tdr3 (.clk, .rst_n, .sel(sib3_cs), .capture_en, .shift_en, .update_en,
    .si(sib3_tsi), .so(t3_so), .capture_data(i3_in), .update_data(tdr3_upd));
endmodule

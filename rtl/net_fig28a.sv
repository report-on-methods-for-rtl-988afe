// net_fig28a: example network #1 used to explain the test of SIBs:
//   tdi -> SIB1 [ TDR1 ] -> SIB2 [ TDR2 ] -> tdo
// TDR1 (3 bits) drives instrument I1 (i1_out); TDR2 (4 bits) captures
// instrument I2 (i2_in). With both SIBs de-asserted the path is 2 bits long;
// the longest path (both asserted) is 9 bits. The TAP controller is outside
// and supplies capture_en/shift_en/update_en. Structure and register lengths
// are those of the example; TDR1 also captures its own update value and TDR2's
// update value is left unused by the instrument, as I1 only receives data and
// I2 only sends it.
module net_fig28a #(
  parameter int unsigned L1 = 3,
  parameter int unsigned L2 = 4
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
  output logic [L2-1:0] tdr2_upd,
  output logic [1:0]    cfg
);
  logic sib1_so, sib1_tsi, sib1_cs, sib2_tsi, sib2_cs, t1_so, t2_so;

  sib u_sib1 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
              .si(tdi), .so(sib1_so), .tsi(sib1_tsi), .fso(t1_so),
              .child_sel(sib1_cs), .asserted(cfg[0]));

  ijtag_tdr #(.LEN(L1)) u_tdr1 (.clk, .rst_n, .sel(sib1_cs), .capture_en, .shift_en, .update_en,
    .si(sib1_tsi), .so(t1_so), .capture_data(i1_out), .update_data(i1_out));

  sib u_sib2 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
              .si(sib1_so), .so(tdo), .tsi(sib2_tsi), .fso(t2_so),
              .child_sel(sib2_cs), .asserted(cfg[1]));

  ijtag_tdr #(.LEN(L2)) u_tdr2 (.clk, .rst_n, .sel(sib2_cs), .capture_en, .shift_en, .update_en,
    .si(sib2_tsi), .so(t2_so), .capture_data(i2_in), .update_data(tdr2_upd));
endmodule

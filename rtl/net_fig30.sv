// net_fig30: example network #3, two instruments reached in parallel through
// a ScanMux:
//   tdi -> TDR1 (drives I1) --\
//   tdi -> TDR2 (from I2)   ---> ScanMux -> S -> tdo
// The one-bit control register S selects TDR1 (0) or TDR2 (1); only the
// selected register receives the control signals, so the path is 1 + L1 or
// 1 + L2 bits. The TAP controller is outside. Structure and instrument
// directions follow the example; the lengths are not given and default to 3
// and 4 bits (they must differ for the test to tell the two paths apart).
module net_fig30 #(
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
  output logic          cfg
);
  logic t1_so, t2_so;
  logic [1:0] seg_sel;
  logic [0:0] select;

  ijtag_tdr #(.LEN(L1)) u_tdr1 (.clk, .rst_n, .sel(seg_sel[0]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(t1_so), .capture_data(i1_out), .update_data(i1_out));

  ijtag_tdr #(.LEN(L2)) u_tdr2 (.clk, .rst_n, .sel(seg_sel[1]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(t2_so), .capture_data(i2_in), .update_data(tdr2_upd));

  scan_mux_ctrl #(.N(2)) u_mux (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
    .seg_so({t2_so, t1_so}), .so(tdo), .seg_sel, .select);

  assign cfg = select[0];
endmodule

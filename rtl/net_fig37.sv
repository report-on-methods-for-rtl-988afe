// net_fig37: small reconfigurable network with three one-bit multiplexer
// controllers, used to model a network as a state machine over its control
// values {C2, C1, C0}:
//   M0 (set by C0): input 0 = tdi -> I2 -> C1, input 1 = M1
//   M1 (set by C1): input 0 = tdi (bypass), input 1 = C2 after M2
//   M2 (set by C2): input 0 = tdi -> I3, input 1 = tdi -> I4
//   M0 -> C0 -> I1 -> tdo
// Active path from tdo per state: 000, 010, 100, 110: I1, C0, C1, I2;
// 001, 101: I1, C0; 011: I1, C0, C2, I3; 111: I1, C0, C2, I4. A register
// gets capture/shift/update only while it is on the active path. One access
// takes one capture cycle, one shift cycle per path bit and one update cycle.
// Each instrument register captures its own update value; a control
// register captures its present value. Reset clears C0..C2.
// Topology, multiplexer input numbering and the 20-bit instrument lengths
// follow the example; reset, capture and the instrument loop-back are this
// implementation's choices.
module net_fig37 #(
  parameter int unsigned L1 = 20,
  parameter int unsigned L2 = 20,
  parameter int unsigned L3 = 20,
  parameter int unsigned L4 = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture_en,
  input  logic       shift_en,
  input  logic       update_en,
  input  logic       tdi,
  output logic       tdo,
  output logic [2:0] cfg          // {C2, C1, C0}
);
  logic [1:0] m0_sel, m2_sel;
  logic [0:0] c0, c1, c2;
  logic [L1-1:0] u1;
  logic [L2-1:0] u2;
  logic [L3-1:0] u3;
  logic [L4-1:0] u4;
  logic i2_so, c1_so, i3_so, i4_so, c2_so, m1, c0_so;

  // M0 input 0: I2 then C1
  ijtag_tdr #(.LEN(L2)) u_i2 (.clk, .rst_n, .sel(m0_sel[0]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(i2_so), .capture_data(u2), .update_data(u2));
  ijtag_tdr #(.LEN(1)) u_c1 (.clk, .rst_n, .sel(m0_sel[0]), .capture_en, .shift_en, .update_en,
    .si(i2_so), .so(c1_so), .capture_data(c1), .update_data(c1));

  // M2 with C2 behind it, on the path only through M1 input 1
  ijtag_tdr #(.LEN(L3)) u_i3 (.clk, .rst_n, .sel(m2_sel[0]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(i3_so), .capture_data(u3), .update_data(u3));
  ijtag_tdr #(.LEN(L4)) u_i4 (.clk, .rst_n, .sel(m2_sel[1]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(i4_so), .capture_data(u4), .update_data(u4));
  scan_mux_ctrl #(.N(2)) u_c2 (.clk, .rst_n, .sel(m0_sel[1] && c1[0]), .capture_en, .shift_en,
    .update_en, .seg_so({i4_so, i3_so}), .so(c2_so), .seg_sel(m2_sel), .select(c2));

  // M1: bypass or the M2/C2 branch
  assign m1 = c1[0] ? c2_so : tdi;

  // M0 with C0 behind it, then I1 (always on the path)
  scan_mux_ctrl #(.N(2)) u_c0 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
    .seg_so({m1, c1_so}), .so(c0_so), .seg_sel(m0_sel), .select(c0));
  ijtag_tdr #(.LEN(L1)) u_i1 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
    .si(c0_so), .so(tdo), .capture_data(u1), .update_data(u1));

  assign cfg = {c2[0], c1[0], c0[0]};
endmodule

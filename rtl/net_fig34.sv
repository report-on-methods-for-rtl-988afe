// net_fig34: reconfigurable example network with six instrument registers on
// multiplexed branches, used to compare access times of different
// configuration sequences:
//   branch 00: tdi -> C3
//   branch 01: tdi -> [I2 | bypass, chosen by C2] -> [I3 | bypass, chosen
//              by C3] -> I4
//   branch 10: tdi -> [I1 | bypass, chosen by C1] -> C2 -> I5
//   branch 11: tdi -> C1
//   the four branches -> ScanMux -> C0 (2 bits, selects the branch) -> I0 -> tdo
// A one-bit control register set to 1 takes the instrument in front of its
// multiplexer off the path (multiplexer input 1 is the bypass wire). A
// register receives capture/shift/update only while it is on the active
// path. Each instrument register captures its own update value, so a read
// returns the last written data; C1..C3 likewise capture their present
// value. Every scan access is one capture cycle, one shift cycle per path
// bit and one update cycle. Reset clears all control bits (path C3, C0, I0).
// Topology, control bits, multiplexer input numbering and the instance A
// lengths follow the example; the capture and reset behaviour and the
// loop-back of the instrument data are this implementation's choices.
module net_fig34 #(
  parameter int unsigned L0 = 20,
  parameter int unsigned L1 = 50,
  parameter int unsigned L2 = 100,
  parameter int unsigned L3 = 20,
  parameter int unsigned L4 = 20,
  parameter int unsigned L5 = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          capture_en,
  input  logic          shift_en,
  input  logic          update_en,
  input  logic          tdi,
  output logic          tdo,
  output logic [L4-1:0] i4_upd,
  output logic [4:0]    cfg          // {C3, C2, C1, C0[1:0]}
);
  logic [3:0] br_so, br_sel;
  logic [1:0] c0;
  logic [0:0] c1, c2, c3;
  logic [L0-1:0] u0;
  logic [L1-1:0] u1;
  logic [L2-1:0] u2;
  logic [L3-1:0] u3;
  logic [L5-1:0] u5;
  logic c0_so, i1_so, i2_so, i3_so, c2_so, m1, m2, m3;

  // branch 00
  ijtag_tdr #(.LEN(1)) u_c3 (.clk, .rst_n, .sel(br_sel[0]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(br_so[0]), .capture_data(c3), .update_data(c3));

  // branch 01
  ijtag_tdr #(.LEN(L2)) u_i2 (.clk, .rst_n, .sel(br_sel[1] && !c2[0]), .capture_en, .shift_en,
    .update_en, .si(tdi), .so(i2_so), .capture_data(u2), .update_data(u2));
  assign m2 = c2[0] ? tdi : i2_so;
  ijtag_tdr #(.LEN(L3)) u_i3 (.clk, .rst_n, .sel(br_sel[1] && !c3[0]), .capture_en, .shift_en,
    .update_en, .si(m2), .so(i3_so), .capture_data(u3), .update_data(u3));
  assign m3 = c3[0] ? m2 : i3_so;
  ijtag_tdr #(.LEN(L4)) u_i4 (.clk, .rst_n, .sel(br_sel[1]), .capture_en, .shift_en, .update_en,
    .si(m3), .so(br_so[1]), .capture_data(i4_upd), .update_data(i4_upd));

  // branch 10
  ijtag_tdr #(.LEN(L1)) u_i1 (.clk, .rst_n, .sel(br_sel[2] && !c1[0]), .capture_en, .shift_en,
    .update_en, .si(tdi), .so(i1_so), .capture_data(u1), .update_data(u1));
  assign m1 = c1[0] ? tdi : i1_so;
  ijtag_tdr #(.LEN(1)) u_c2 (.clk, .rst_n, .sel(br_sel[2]), .capture_en, .shift_en, .update_en,
    .si(m1), .so(c2_so), .capture_data(c2), .update_data(c2));
  ijtag_tdr #(.LEN(L5)) u_i5 (.clk, .rst_n, .sel(br_sel[2]), .capture_en, .shift_en, .update_en,
    .si(c2_so), .so(br_so[2]), .capture_data(u5), .update_data(u5));

  // branch 11
  ijtag_tdr #(.LEN(1)) u_c1 (.clk, .rst_n, .sel(br_sel[3]), .capture_en, .shift_en, .update_en,
    .si(tdi), .so(br_so[3]), .capture_data(c1), .update_data(c1));

  // ScanMux with C0, then I0 (always on the path)
  scan_mux_ctrl #(.N(4)) u_c0 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
    .seg_so(br_so), .so(c0_so), .seg_sel(br_sel), .select(c0));
  ijtag_tdr #(.LEN(L0)) u_i0 (.clk, .rst_n, .sel(1'b1), .capture_en, .shift_en, .update_en,
    .si(c0_so), .so(tdo), .capture_data(u0), .update_data(u0));

  assign cfg = {c3[0], c2[0], c1[0], c0};
endmodule

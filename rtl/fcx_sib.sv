// fcx_sib: segment insertion bit with fault-flag support (FCX-SIB).
//
// The SIB owns four scan cells, ordered from scan input to scan output
// S, X, C, F, so a controller shifts the F value first and the S value last.
//   S  - SIB state: 1 opens the child segment, 0 bypasses it (update register)
//   X  - mask: 1 hides the child segment's flags from the levels above (update register)
//   C  - on capture, the child segment's "corrected" flag is read
//   F  - on capture, the child segment's "fault" flag is read
// On capture, S and X load their update values so that a read-back shows the
// SIB's present state. When S is 1 the child segment sits in front of the
// SIB's cells: tsi copies si and the first cell takes its input from fso,
// which places the child segment between si and the SIB's own cells.
//
// Flag propagation is combinational and needs no clock:
//   f_out = f_prev | (f_child & ~X)      c_out = c_prev & (c_child | X)
// f_prev/c_prev come from the SIB before this one in the same segment (tie to
// 0/1 for the first one) so a segment's flags collect along its SIBs; the last
// SIB's f_out/c_out are the segment's flags. No fault is F=0, C=1; a corrected
// fault is F=1, C=1; an uncorrected fault is F=1, C=0. The captured F and C
// pass through two-flip-flop synchronizers since instruments need not run on
// the scan clock.
//
// Control: capture_en, shift_en and update_en act only while sel is high;
// child_sel = sel & S gates them for the child segment. S and X reset to 0
// (closed, unmasked).
//
// The scan cell order, the capture/update split of the flags and the
// synchronizers follow the design description; the propagation equations and
// the capture of S and X are this implementation's reading of it.
module fcx_sib (
  input  logic clk,
  input  logic rst_n,
  input  logic sel,
  input  logic capture_en,
  input  logic shift_en,
  input  logic update_en,
  input  logic si,
  output logic so,
  output logic tsi,
  input  logic fso,
  output logic child_sel,
  input  logic f_child,
  input  logic c_child,
  input  logic f_prev,
  input  logic c_prev,
  output logic f_out,
  output logic c_out,
  output logic s_state,
  output logic x_state
);
  logic sh_s, sh_x, sh_c, sh_f;
  logic upd_s, upd_x;
  logic f_sync, c_sync;
  logic scan_in;

  sync2 #(.RESET_VAL(1'b0)) u_sync_f (.clk(clk), .rst_n(rst_n), .d(f_child), .q(f_sync));
  sync2 #(.RESET_VAL(1'b1)) u_sync_c (.clk(clk), .rst_n(rst_n), .d(c_child), .q(c_sync));

  assign scan_in   = upd_s ? fso : si;
  assign tsi       = si;
  assign so        = sh_f;
  assign child_sel = sel & upd_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_s <= 1'b0;
      sh_x <= 1'b0;
      sh_c <= 1'b1;
      sh_f <= 1'b0;
    end else if (sel && capture_en) begin
      sh_s <= upd_s;
      sh_x <= upd_x;
      sh_c <= c_sync;
      sh_f <= f_sync;
    end else if (sel && shift_en) begin
      sh_s <= scan_in;
      sh_x <= sh_s;
      sh_c <= sh_x;
      sh_f <= sh_c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_s <= 1'b0;
      upd_x <= 1'b0;
    end else if (sel && update_en) begin
      upd_s <= sh_s;
      upd_x <= sh_x;
    end
  end

  assign f_out   = f_prev | (f_child & ~upd_x);
  assign c_out   = c_prev & (c_child | upd_x);
  assign s_state = upd_s;
  assign x_state = upd_x;
endmodule

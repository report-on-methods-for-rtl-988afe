// dedicated_wrapper_cell: a core wrapper cell with its own flip-flop, placed
// beside the functional path between cfi and cfo.
//
//   flip-flop D = shift_en ? cti : cfo        (shift, else capture/hold)
//   cfo         = capture_en ? flip-flop : cfi
//   cto         = flip-flop
// With capture_en low the functional value passes through to cfo and is
// captured on every shift_clk edge; with capture_en high the flip-flop drives
// cfo and, when not shifting, holds its value (it reloads its own output).
// Optional safe state: while safe_ctrl is high cfo carries safe_value instead.
// The two multiplexers and the flip-flop follow the IEEE 1500 style cell of
// the design description; the safe-state multiplexer sits after the capture
// multiplexer, outside the hold loop, which is this implementation's choice.
// The flip-flop has no reset: a wrapper chain is initialized by shifting.
module dedicated_wrapper_cell (
  input  logic shift_clk,
  input  logic shift_en,
  input  logic capture_en,
  input  logic safe_ctrl,
  input  logic safe_value,
  input  logic cti,
  input  logic cfi,
  output logic cto,
  output logic cfo
);
  logic ff, cfo_int;

  assign cfo_int = capture_en ? ff : cfi;

  always_ff @(posedge shift_clk) ff <= shift_en ? cti : cfo_int;

  assign cfo = safe_ctrl ? safe_value : cfo_int;
  assign cto = ff;
endmodule

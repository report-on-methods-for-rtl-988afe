// shared_wrapper_cell: a wrapper cell that reuses a functional flip-flop of
// the core, so the flip-flop sits in the functional path and cfo = cto = Q.
//
//   D = capture_en ? (shift_en ? cti : Q) : cfi
// capture_en low: normal functional flip-flop (captures cfi).
// capture_en high: shifts (shift_en high) or holds (shift_en low).
// The structure (two multiplexers in front of the flip-flop) follows the
// shared cell of the design description. No reset, as for the functional
// flip-flop it replaces.
module shared_wrapper_cell (
  input  logic shift_clk,
  input  logic shift_en,
  input  logic capture_en,
  input  logic cti,
  input  logic cfi,
  output logic cto,
  output logic cfo
);
  logic q;

  always_ff @(posedge shift_clk) q <= capture_en ? (shift_en ? cti : q) : cfi;

  assign cfo = q;
  assign cto = q;
endmodule

// opt_wrapper_cell: optimized shared wrapper cell, a plain scan flip-flop.
//
//   D = shift_en ? cti : cfi      cto = Q      cfo = Q | safe_ctrl
// There is no hold mode and no capture_en: the cell captures cfi whenever it
// does not shift. The wrapper behaviour comes only from how shift_en is driven
// (see core_wrapper). With SAFE = 1 an OR gate on cfo forces the output to 1
// while safe_ctrl is high, so a test inside the core cannot disturb the logic
// it drives; with SAFE = 0 the gate is left out and safe_ctrl is unused.
// Follows the optimized cell of the design description; the safe value 1
// comes from the OR gate it names. No reset, as for a scan flip-flop.
module opt_wrapper_cell #(
  parameter bit SAFE = 1'b1
) (
  input  logic shift_clk,
  input  logic shift_en,
  input  logic safe_ctrl,
  input  logic cti,
  input  logic cfi,
  output logic cto,
  output logic cfo
);
  logic q;

  always_ff @(posedge shift_clk) q <= shift_en ? cti : cfi;

  assign cto = q;
  assign cfo = SAFE ? (q | safe_ctrl) : q;
endmodule

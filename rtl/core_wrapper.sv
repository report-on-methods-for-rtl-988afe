// core_wrapper: isolation wrapper of a core built from optimized shared
// wrapper cells (opt_wrapper_cell), one input wrapper chain and one output
// wrapper chain.
//
// Input cells sit between the surrounding logic (pi) and the core (core_in);
// output cells between the core (core_out) and the surrounding logic (po).
// The cells are plain scan flip-flops, so the wrapper modes come only from the
// two scan enables, derived from one scan_en and the mode bits:
//   test_en = 0            functional: se_i = se_o = scan_en (ordinary scan)
//   INTEST  (extest_en=0)  se_i = 1 (input chain always shifts, the core is
//                          cut off from pi), se_o = scan_en (output chain
//                          captures core responses); safe_en forces po to 1
//   EXTEST  (extest_en=1)  se_o = 1 (output chain always shifts and drives po),
//                          se_i = scan_en (input chain captures pi)
// Chains: scan_in_i -> input cell 0 ... N_IN-1 -> scan_out_i, likewise for the
// output chain. Default sizes are the input and output wrapper chain lengths
// reported for the balanced insertion into an industrial core (645 and 4,596).
// Following the design description: the cell type, the scan-enable roles in
// INTEST and EXTEST, safe mode on the output chain in INTEST. This
// implementation's own choices: one chain per side, the functional-mode
// scan-enable rule, and the single safe_en bit.
module core_wrapper #(
  parameter int unsigned N_IN  = 645,
  parameter int unsigned N_OUT = 4596
) (
  input  logic             clk,
  input  logic             test_en,
  input  logic             extest_en,
  input  logic             scan_en,
  input  logic             safe_en,
  input  logic             scan_in_i,
  output logic             scan_out_i,
  input  logic             scan_in_o,
  output logic             scan_out_o,
  input  logic [N_IN-1:0]  pi,
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [N_OUT-1:0] po
);
  logic se_i, se_o, safe;
  logic [N_IN:0]  chain_i;
  logic [N_OUT:0] chain_o;

  always_comb begin
    se_i = scan_en;
    se_o = scan_en;
    safe = 1'b0;
    if (test_en) begin
      if (extest_en) begin
        se_o = 1'b1;
      end else begin
        se_i = 1'b1;
        safe = safe_en;
      end
    end
  end

  assign chain_i[0] = scan_in_i;
  assign chain_o[0] = scan_in_o;

  for (genvar i = 0; i < int'(N_IN); i++) begin : g_in
    opt_wrapper_cell #(.SAFE(1'b0)) u_cell (
      .shift_clk(clk), .shift_en(se_i), .safe_ctrl(1'b0),
      .cti(chain_i[i]), .cfi(pi[i]), .cto(chain_i[i+1]), .cfo(core_in[i])
    );
  end

  for (genvar i = 0; i < int'(N_OUT); i++) begin : g_out
    opt_wrapper_cell #(.SAFE(1'b1)) u_cell (
      .shift_clk(clk), .shift_en(se_o), .safe_ctrl(safe),
      .cti(chain_o[i]), .cfi(core_out[i]), .cto(chain_o[i+1]), .cfo(po[i])
    );
  end

  assign scan_out_i = chain_i[N_IN];
  assign scan_out_o = chain_o[N_OUT];
endmodule

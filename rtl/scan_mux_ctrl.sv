// scan_mux_ctrl: ScanMux with its shift-update control register.
//
// N scan segments end at seg_so[N-1:0]; the multiplexer passes the one named
// by the control register's update stage to the control register's shift
// stage, whose last cell is so. The control register has CW = clog2(N) cells;
// scan data enters at the top cell and so is cell 0, so the first bit shifted
// in ends in bit 0 of the select value. seg_sel[i] = sel & (select == i): only
// the selected segment receives the control signals. While sel is high:
// capture_en loads the present select value into the shift stage, shift_en
// shifts, update_en copies the shift stage to the select value. Reset selects
// input 0. Follows the ScanMux and control register of the design
// description; bit order, capture and reset are this implementation's
// choices.
module scan_mux_ctrl #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,
  input  logic         capture_en,
  input  logic         shift_en,
  input  logic         update_en,
  input  logic [N-1:0] seg_so,
  output logic         so,
  output logic [N-1:0] seg_sel,
  output logic [$clog2(N)-1:0] select
);
  localparam int CW = $clog2(N);
  logic [CW-1:0] sh;
  logic mux_out;

  assign mux_out = seg_so[select];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    sh <= '0;
    else if (sel && capture_en)    sh <= select;
    else if (sel && shift_en)      sh <= (sh >> 1) | (CW'(mux_out) << (CW - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    select <= '0;
    else if (sel && update_en)     select <= sh;
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) seg_sel[i] = sel && (int'(select) == i);
  end

  assign so = sh[0];
endmodule

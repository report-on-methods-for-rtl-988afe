// sib: standard segment insertion bit.
//
// One shift cell S and one update cell U. The shift cell takes its input from
// a two-input scan multiplexer controlled by U: U = 0 selects si, so the path
// runs si -> S -> so and the child segment is bypassed; U = 1 selects fso, so
// the child segment (driven from tsi, a copy of si) is inserted in front of S.
// so is the S cell. While sel is high: capture_en copies U into S (reads back
// the state), shift_en shifts, update_en copies S into U. child_sel = sel & U
// gates the child segment's control signals. U resets to 0 (de-asserted).
// Structure as in the usual simplified SIB schematic; the capture of U and the
// reset value are this implementation's choices.
module sib (
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
  output logic asserted
);
  logic s, u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    s <= 1'b0;
    else if (sel && capture_en)    s <= u;
    else if (sel && shift_en)      s <= u ? fso : si;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    u <= 1'b0;
    else if (sel && update_en)     u <= s;
  end

  assign so        = s;
  assign tsi       = si;
  assign child_sel = sel & u;
  assign asserted  = u;
endmodule

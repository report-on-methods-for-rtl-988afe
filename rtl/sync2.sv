// sync2: two back-to-back flip-flops that bring an asynchronous level into the
// clock domain of clk. The output follows the input two rising edges later.
// RESET_VAL is the value both stages take while rst_n is low.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule

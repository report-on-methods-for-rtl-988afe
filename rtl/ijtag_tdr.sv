// ijtag_tdr: test data register of an instrument, a shift register with a
// capture stage and an update stage.
//
// While sel is high: capture_en loads capture_data into the shift stage,
// shift_en shifts one bit per clock (si enters at the top bit, so shows bit 0,
// so the bit shifted in first ends up in bit 0 and bit 0 leaves first), and
// update_en copies the shift stage to update_data, the value the instrument
// sees. Nothing happens while sel is low. Both stages reset to 0.
// The capture/shift/update behaviour is the usual IEEE 1687 register; the bit
// order (least significant bit first) follows the instrument manager's
// convention of shifting the least significant bit first.
module ijtag_tdr #(
  parameter int unsigned LEN = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sel,
  input  logic           capture_en,
  input  logic           shift_en,
  input  logic           update_en,
  input  logic           si,
  output logic           so,
  input  logic [LEN-1:0] capture_data,
  output logic [LEN-1:0] update_data
);
  logic [LEN-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0;
    end else if (sel && capture_en) begin
      sh <= capture_data;
    end else if (sel && shift_en) begin
      sh <= (sh >> 1) | (LEN'(si) << (LEN - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  update_data <= '0;
    else if (sel && update_en)   update_data <= sh;
  end

  assign so = sh[0];
endmodule

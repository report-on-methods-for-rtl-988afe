// lbist: logic built-in self-test for a wrapped core: pseudo-random pattern
// generator (PRPG), response analyzer (MISR) and controller.
//
// Configuration (held in registers that a scan network or bus can load):
// seed, number of patterns, shift length (length of the longest chain) and
// the golden signature. A start pulse runs:
//   shift shift_len cycles (scan_en = 1) loading pattern 1,
//   then for each pattern: one capture cycle (scan_en = 0) and shift_len
//   shift cycles that unload its responses while loading the next pattern.
// Total: (n_patterns + 1) * shift_len + n_patterns cycles; done then rises,
// and pass = (signature == golden). chain_si[i] is PRPG bit i; every cycle
// that shifts, the MISR absorbs chain_so (bit i into MISR bit i).
// PRPG: 32-bit Galois LFSR, polynomial x^32 + x^22 + x^2 + x + 1, a zero seed
// is replaced by 1. MISR: 32-bit with the same polynomial, cleared at start.
// The split into PRPG, MISR with a golden-signature compare and a controller
// with configuration registers follows the design description; polynomial,
// widths and the shift/capture schedule are this implementation's choices.
module lbist #(
  parameter int unsigned CHAINS = 2,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       seed,
  input  logic [CNT_W-1:0]  n_patterns,
  input  logic [CNT_W-1:0]  shift_len,
  input  logic [31:0]       golden,
  output logic              busy,
  output logic              done,
  output logic              pass,
  output logic [31:0]       signature,
  output logic              scan_en,
  output logic [CHAINS-1:0] chain_si,
  input  logic [CHAINS-1:0] chain_so
);
  localparam logic [31:0] POLY = 32'h0040_0007;  // x^22 + x^2 + x + 1 (x^32 implied)

  typedef enum logic [1:0] {L_IDLE, L_SHIFT, L_CAPTURE} lstate_e;
  lstate_e state;
  logic [31:0] prpg, misr;
  logic [CNT_W-1:0] cnt, pat;

  function automatic logic [31:0] lfsr_step(input logic [31:0] v);
    return {v[30:0], 1'b0} ^ (v[31] ? POLY : 32'h0);
  endfunction

  assign busy      = (state != L_IDLE);
  assign scan_en   = (state == L_SHIFT);
  assign chain_si  = prpg[CHAINS-1:0];
  assign signature = misr;
  assign pass      = done && (misr == golden);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_IDLE;
      prpg  <= 32'h1;
      misr  <= '0;
      cnt   <= '0;
      pat   <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        L_IDLE: begin
          if (start) begin
            prpg  <= (seed == '0) ? 32'h1 : seed;
            misr  <= '0;
            cnt   <= '0;
            pat   <= '0;
            done  <= 1'b0;
            state <= L_SHIFT;
          end
        end
        L_SHIFT: begin
          prpg <= lfsr_step(prpg);
          misr <= lfsr_step(misr) ^ 32'(chain_so);
          if (cnt == shift_len - 1'b1) begin
            cnt <= '0;
            if (pat == n_patterns) begin
              done  <= 1'b1;
              state <= L_IDLE;
            end else begin
              state <= L_CAPTURE;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        L_CAPTURE: begin
          pat   <= pat + 1'b1;
          state <= L_SHIFT;
        end
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule

// session_tester: runs the test phase of one network test session.
//
// After the network has been configured so that a path of expected length
// path_len lies between TDI and TDO, a start pulse makes this block drive the
// network's shift_en and tdi for long_len + path_len + 2 cycles:
//   1. long_len cycles of tdi = 0 (long_len = the longest path of the network,
//      so that even a wrongly configured path is flushed to all 0s);
//   2. path_len + 2 cycles of alternating tdi = 1, 0, 1, ...
// During phase 2 tdo is sampled before each shift edge k = 0 .. path_len+1:
// it must be 0 for k < path_len, 1 at k = path_len and 0 at k = path_len+1,
// i.e. the alternating sequence must start emerging exactly path_len cycles
// after it entered. pass is valid with done (one-cycle pulse) and stays until
// the next start; cycles counts the shift cycles of the last run.
// The procedure and its duration L + l + 2 are those of the document; doing it
// in a hardware block (instead of from the tester) is this design's choice.
module session_tester #(
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] long_len,
  input  logic [LW-1:0] path_len,
  output logic          shift_en,
  output logic          tdi,
  input  logic          tdo,
  output logic          busy,
  output logic          done,
  output logic          pass,
  output logic [LW:0]   cycles
);
  typedef enum logic [1:0] {T_IDLE, T_FLUSH, T_ALT} tstate_e;
  tstate_e       state;
  logic [LW-1:0] cnt, l_q;
  logic          ok;

  assign busy     = (state != T_IDLE);
  assign shift_en = busy;
  // alternating phase starts with a 1; cnt counts the edges already applied
  assign tdi      = (state == T_ALT) && !cnt[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= T_IDLE;
      cnt    <= '0;
      l_q    <= '0;
      ok     <= 1'b0;
      done   <= 1'b0;
      pass   <= 1'b0;
      cycles <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      unique case (state)
        T_IDLE: if (start) begin
          l_q    <= path_len;
          ok     <= 1'b1;
          pass   <= 1'b0;
          cycles <= '0;
          cnt    <= '0;
          state  <= (long_len == '0) ? T_ALT : T_FLUSH;
        end
        T_FLUSH: begin
          if (cnt == long_len - 1'b1) begin
            cnt   <= '0;
            state <= T_ALT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        T_ALT: begin
          if (tdo != (cnt == l_q)) ok <= 1'b0;
          if (cnt == l_q + 1'b1) begin
            state <= T_IDLE;
            done  <= 1'b1;
            pass  <= ok && !tdo;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // the alternating phase never runs past its last sample
  always_comb begin
    if (state == T_ALT) a_alt_bound: assert ({1'b0, cnt} <= {1'b0, l_q} + 1'b1);
  end
endmodule

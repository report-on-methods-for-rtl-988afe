// instrument_manager: controller that connects the fault-management software
// (FM) to a hierarchical IJTAG network of FCX-SIBs and instrument registers.
//
// Software side: two 32-bit registers (bus_addr 0 = IM_CMD, 1 = IM_DATA, see
// ijtag_pkg for the IM_CMD bits) and two interrupt lines. irq_hi is raised when
// the network's top-level flags show an uncorrected fault (F=1, C=0); irq_lo on a
// corrected fault (F=1, C=1) and when a command finishes. Both stay high until
// software writes the matching ACK bit.
// Commands: READ, WRITE or OPEN the path to the register at instrument address
// IA; SET_X writes the mask bit of the SIB at address IA with IM_DATA[0];
// CLOSE_ALL closes every SIB. CLOSE_AFTER closes every SIB once an access ends.
//
// Network side: the manager drives the network's capture/shift/update enables
// and scan input directly, one bit per clock, and samples the scan output in
// the same cycle. Each capture-shift-update sequence (CSU) walks the network
// map ROM from word 0 (the node next to the scan output): a SIB gets four
// bits (F and C are shifted as 0, then X, then S) while its captured F and C come
// out and are stored in the status RAM; a register gets its length in bits:
// the value from IM_DATA if it is the WRITE target, else zeros, and its output
// is stored into IM_DATA if it is the READ target. If a SIB is open in the
// present CSU the walk goes to the next word (its child segment), otherwise it
// jumps by the SIB's offset. The new S of each SIB is decided during the walk:
//   access:        open if the target address lies strictly between the SIB's
//                  address and address + offset, else close (dynamic retargeting)
//   localization:  open if the SIB's captured flags show F=1, C=0 and X=0
//   close-all:     open only while a SIB below it is still open, so the
//                  deepest SIBs close first
// After the end-of-map word the manager pulses update and decides whether
// another CSU is needed: the access ends in the CSU that reached the target;
// localization ends in a CSU that opened no SIB; close-all ends when the RAM
// shows no open SIB. An uncorrected fault seen while an access has not yet
// reached its target aborts the access at the end of the current CSU
// (status ABORTED) and localization starts from the present configuration.
// Localization also starts on its own whenever the manager is idle and an
// uncorrected fault is pending. It reports the address of the first register
// below the deepest open, flagged SIB (LOC_ADDR, LOC_VALID) and does not start
// again until software acknowledges the high-priority interrupt.
// A CSU costs 1 capture cycle, 1 cycle per visited node, 1 per shifted bit,
// 1 for the end-of-map word and 1 update cycle.
//
// Following the design description: the ROM/RAM formats, the walk with jump
// offsets, the retargeting rule, the F, C, X, S shift order, zeros for
// non-target registers, least-significant bit first, the two interrupt
// priorities and the autonomous localization. This implementation's own
// choices: the IM_CMD layout, the bus, the decision rules at UPDATE, aborting
// only at a CSU boundary, localization opening a flagged SIB in the same CSU
// that reads its flags, the MAX_CSU limit (an ERROR when a target cannot be
// reached), and registers longer than 32 bits exchanging only their low 32 bits.
// The F and C fields of the status RAM are kept as a record of the last CSU;
// the FSM itself decides from the bits captured in the current CSU, so those
// two fields of the RAM read word are not used here (lint reports them).
module instrument_manager
  import ijtag_pkg::*;
#(
  parameter int unsigned DEPTH = TABLE1_DEPTH,
  parameter logic [DEPTH*ROM_W-1:0] ROM_INIT = TABLE1_ROM,
  parameter int unsigned MAX_CSU = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // memory-mapped interface to the fault manager
  input  logic        bus_we,
  input  logic        bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        irq_hi,
  output logic        irq_lo,
  // IJTAG network port
  output logic        net_sel,
  output logic        net_capture,
  output logic        net_shift,
  output logic        net_update,
  output logic        net_si,
  input  logic        net_so,
  input  logic        net_f,
  input  logic        net_c
);
  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_HUB, S_SIB_F, S_SIB_C, S_SIB_X, S_SIB_S,
    S_REG_W, S_REG_R, S_UPDATE
  } state_e;

  state_e    state;
  im_mode_e  mode;
  im_op_e    op;
  logic [ADDR_W-1:0] tgt;
  logic      close_after;
  logic [31:0] data_q;
  logic      cmd_pending;
  logic      done_q, aborted_q, error_q;
  logic      loc_done_q, loc_valid_q;
  logic [ADDR_W-1:0] loc_addr_q;
  logic      irq_hi_q, irq_lo_q;

  logic [ADDR_W-1:0] addr;
  logic [7:0] bitcnt;
  logic [7:0] bitidx;
  logic [31:0] sh_data;
  ram_word_t cur;
  logic      cap_f, cap_c, new_x_q;
  logic      pending_open, tgt_visited;
  logic [7:0] csu_cnt;
  logic      loc_sib_v, loc_reg_v;
  logic [ADDR_W-1:0] loc_sib_a, loc_reg_a;
  logic [ADDR_W:0]   loc_end;

  // ROM and RAM
  logic [ADDR_W-1:0] rom_addr;
  rom_word_t rom_q;
  ram_word_t ram_q;
  logic      ram_we;
  ram_word_t ram_wdata;
  logic [DEPTH-1:0] s_bits;

  assign rom_addr = (state == S_IDLE) ? tgt : addr;

  im_rom #(.DEPTH(DEPTH), .INIT(ROM_INIT)) u_rom (.addr(rom_addr), .rdata(rom_q));
  im_ram #(.DEPTH(DEPTH)) u_ram (
    .clk(clk), .rst_n(rst_n), .we(ram_we), .waddr(addr), .wdata(ram_wdata),
    .raddr(addr), .rdata(ram_q), .s_bits(s_bits)
  );

  // top-level fault flags
  logic top_f, top_c, unc, cor, unc_d, cor_d, loc_req;
  sync2 #(.RESET_VAL(1'b0)) u_sync_f (.clk(clk), .rst_n(rst_n), .d(net_f), .q(top_f));
  sync2 #(.RESET_VAL(1'b1)) u_sync_c (.clk(clk), .rst_n(rst_n), .d(net_c), .q(top_c));
  assign unc     = top_f & ~top_c;
  assign cor     = top_f & top_c;
  assign loc_req = unc & ~loc_done_q;

  // address arithmetic on one extra bit so a jump past the map cannot wrap
  logic [ADDR_W:0] jump_end;
  logic            tgt_inside, subtree_open, any_open;
  assign jump_end   = {1'b0, addr} + {1'b0, rom_q.len};
  assign tgt_inside = ({1'b0, tgt} > {1'b0, addr}) && ({1'b0, tgt} < jump_end);
  assign any_open   = |s_bits;

  always_comb begin
    subtree_open = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (i > int'(addr) && i < int'(jump_end) && s_bits[i]) subtree_open = 1'b1;
    end
  end

  // values shifted into the SIB being visited
  logic new_x, new_s;
  always_comb begin
    new_x = cur.x;
    if (mode == MODE_ACCESS && op == OP_SET_X && addr == tgt) new_x = data_q[0];
    unique case (mode)
      MODE_LOC:   new_s = cap_f & ~cap_c & ~cur.x;
      MODE_CLOSE: new_s = subtree_open;
      default:    new_s = (op == OP_SET_X && addr == tgt) ? cur.s : tgt_inside;
    endcase
  end

  // network control outputs
  always_comb begin
    net_sel     = 1'b1;
    net_capture = (state == S_INIT);
    net_update  = (state == S_UPDATE);
    net_shift   = 1'b0;
    net_si      = 1'b0;
    ram_we      = 1'b0;
    ram_wdata   = '{f: cap_f, c: cap_c, x: new_x_q, s: new_s};
    unique case (state)
      S_SIB_F, S_SIB_C: net_shift = 1'b1;
      S_SIB_X: begin net_shift = 1'b1; net_si = new_x; end
      S_SIB_S: begin net_shift = 1'b1; net_si = new_s; ram_we = 1'b1; end
      S_REG_W: begin net_shift = 1'b1; net_si = (bitidx < 8'd32) ? sh_data[bitidx[4:0]] : 1'b0; end
      S_REG_R: net_shift = 1'b1;
      default: ;
    endcase
  end

  // bus read
  always_comb begin
    bus_rdata = '0;
    if (bus_addr) begin
      bus_rdata = data_q;
    end else begin
      bus_rdata[CMD_IA_LSB +: ADDR_W] = tgt;
      bus_rdata[CMD_OP_LSB +: 3]      = op;
      bus_rdata[CMD_CLOSE_AFTER]      = close_after;
      bus_rdata[ST_BUSY]              = (state != S_IDLE) || cmd_pending;
      bus_rdata[ST_DONE]              = done_q;
      bus_rdata[ST_ABORTED]           = aborted_q;
      bus_rdata[ST_ERROR]             = error_q;
      bus_rdata[ST_LOC_VALID]         = loc_valid_q;
      bus_rdata[ST_TOP_F]             = top_f;
      bus_rdata[ST_TOP_C]             = top_c;
      bus_rdata[ST_LOC_ACTIVE]        = (state != S_IDLE) && (mode == MODE_LOC);
      bus_rdata[ST_LOC_ADDR_LSB +: ADDR_W] = loc_addr_q;
    end
  end

  assign irq_hi = irq_hi_q;
  assign irq_lo = irq_lo_q;

  logic accept_start;
  assign accept_start = bus_we && !bus_addr && bus_wdata[CMD_START] &&
                        (state == S_IDLE) && !cmd_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode <= MODE_ACCESS;
      op <= OP_NOP;
      tgt <= '0;
      close_after <= 1'b0;
      data_q <= '0;
      cmd_pending <= 1'b0;
      done_q <= 1'b0;
      aborted_q <= 1'b0;
      error_q <= 1'b0;
      loc_done_q <= 1'b0;
      loc_valid_q <= 1'b0;
      loc_addr_q <= '0;
      irq_hi_q <= 1'b0;
      irq_lo_q <= 1'b0;
      unc_d <= 1'b0;
      cor_d <= 1'b0;
      addr <= '0;
      bitcnt <= '0;
      bitidx <= '0;
      sh_data <= '0;
      cur <= '0;
      cap_f <= 1'b0;
      cap_c <= 1'b1;
      new_x_q <= 1'b0;
      pending_open <= 1'b0;
      tgt_visited <= 1'b0;
      csu_cnt <= '0;
      loc_sib_v <= 1'b0;
      loc_reg_v <= 1'b0;
      loc_sib_a <= '0;
      loc_reg_a <= '0;
      loc_end <= '0;
    end else begin
      // interrupts
      unc_d <= unc;
      cor_d <= cor;
      if (unc && !unc_d) irq_hi_q <= 1'b1;
      if (cor && !cor_d) irq_lo_q <= 1'b1;
      if (bus_we && !bus_addr && bus_wdata[CMD_ACK_HI]) begin
        irq_hi_q   <= 1'b0;
        loc_done_q <= 1'b0;
      end
      if (bus_we && !bus_addr && bus_wdata[CMD_ACK_LO]) irq_lo_q <= 1'b0;

      // software writes
      if (accept_start) begin
        tgt         <= bus_wdata[CMD_IA_LSB +: ADDR_W];
        op          <= im_op_e'(bus_wdata[CMD_OP_LSB +: 3]);
        close_after <= bus_wdata[CMD_CLOSE_AFTER];
        cmd_pending <= 1'b1;
        done_q      <= 1'b0;
        aborted_q   <= 1'b0;
        error_q     <= 1'b0;
      end
      if (bus_we && bus_addr && state == S_IDLE) data_q <= bus_wdata;

      unique case (state)
        S_IDLE: begin
          if (loc_req) begin
            mode        <= MODE_LOC;
            csu_cnt     <= '0;
            loc_valid_q <= 1'b0;
            state       <= S_INIT;
          end else if (cmd_pending) begin
            cmd_pending <= 1'b0;
            csu_cnt     <= '0;
            unique case (op)
              OP_NOP: begin
                done_q <= 1'b1;
                irq_lo_q <= 1'b1;
              end
              OP_CLOSE_ALL: begin
                mode  <= MODE_CLOSE;
                state <= S_INIT;
              end
              OP_READ, OP_WRITE, OP_OPEN: begin
                if (rom_q.ntype == NODE_REG && rom_q.len != '0) begin
                  mode  <= MODE_ACCESS;
                  state <= S_INIT;
                end else begin
                  error_q <= 1'b1; done_q <= 1'b1; irq_lo_q <= 1'b1;
                end
              end
              OP_SET_X: begin
                if (rom_q.ntype == NODE_SIB) begin
                  mode  <= MODE_ACCESS;
                  state <= S_INIT;
                end else begin
                  error_q <= 1'b1; done_q <= 1'b1; irq_lo_q <= 1'b1;
                end
              end
              default: begin
                error_q <= 1'b1; done_q <= 1'b1; irq_lo_q <= 1'b1;
              end
            endcase
          end
        end

        S_INIT: begin
          addr         <= '0;
          pending_open <= 1'b0;
          tgt_visited  <= 1'b0;
          loc_sib_v    <= 1'b0;
          loc_reg_v    <= 1'b0;
          csu_cnt      <= csu_cnt + 8'd1;
          state        <= S_HUB;
        end

        S_HUB: begin
          if (mode == MODE_ACCESS && addr == tgt) tgt_visited <= 1'b1;
          unique case (rom_q.ntype)
            NODE_SIB: begin
              cur   <= ram_q;
              state <= S_SIB_F;
            end
            NODE_REG: begin
              if (rom_q.len == '0) begin
                addr <= addr + 1'b1;
              end else begin
                bitcnt <= rom_q.len - 8'd1;
                bitidx <= '0;
                if (mode == MODE_ACCESS && addr == tgt && op == OP_READ) begin
                  data_q <= '0;
                  state  <= S_REG_R;
                end else begin
                  sh_data <= (mode == MODE_ACCESS && addr == tgt && op == OP_WRITE) ? data_q : '0;
                  state   <= S_REG_W;
                end
                if (loc_sib_v && !loc_reg_v && addr > loc_sib_a &&
                    {1'b0, addr} < loc_end) begin
                  loc_reg_v <= 1'b1;
                  loc_reg_a <= addr;
                end
              end
            end
            default: state <= S_UPDATE;   // end of map (or an unused code)
          endcase
        end

        S_SIB_F: begin
          cap_f <= net_so;
          state <= S_SIB_C;
        end

        S_SIB_C: begin
          cap_c <= net_so;
          state <= S_SIB_X;
        end

        S_SIB_X: begin
          new_x_q <= new_x;
          state   <= S_SIB_S;
        end

        S_SIB_S: begin
          if (new_s && !cur.s) pending_open <= 1'b1;
          if (mode == MODE_LOC && cur.s && cap_f && !cap_c && !cur.x) begin
            loc_sib_v <= 1'b1;
            loc_sib_a <= addr;
            loc_end   <= jump_end;
            loc_reg_v <= 1'b0;
          end
          if (cur.s) addr <= addr + 1'b1;
          else if (jump_end > (ADDR_W+1)'(2**ADDR_W - 1)) addr <= '1;
          else addr <= jump_end[ADDR_W-1:0];
          state <= S_HUB;
        end

        S_REG_W, S_REG_R: begin
          if (state == S_REG_R && bitidx < 8'd32) data_q[bitidx[4:0]] <= net_so;
          bitidx <= bitidx + 8'd1;
          if (bitcnt == '0) begin
            addr  <= addr + 1'b1;
            state <= S_HUB;
          end else begin
            bitcnt <= bitcnt - 8'd1;
          end
        end

        S_UPDATE: begin
          state <= S_IDLE;
          unique case (mode)
            MODE_ACCESS: begin
              if (tgt_visited) begin
                if (close_after) begin
                  mode  <= MODE_CLOSE;
                  state <= S_INIT;
                end else begin
                  done_q <= 1'b1; irq_lo_q <= 1'b1;
                end
              end else if (loc_req) begin
                aborted_q <= 1'b1; done_q <= 1'b1; irq_lo_q <= 1'b1;
                mode      <= MODE_LOC;
                csu_cnt   <= '0;
                loc_valid_q <= 1'b0;
                state     <= S_INIT;
              end else if (!pending_open || csu_cnt >= 8'(MAX_CSU)) begin
                error_q <= 1'b1; done_q <= 1'b1; irq_lo_q <= 1'b1;
              end else begin
                state <= S_INIT;
              end
            end
            MODE_LOC: begin
              if (pending_open && csu_cnt < 8'(MAX_CSU)) begin
                state <= S_INIT;
              end else begin
                loc_done_q  <= 1'b1;
                loc_valid_q <= loc_reg_v;
                loc_addr_q  <= loc_reg_a;
              end
            end
            default: begin
              if (any_open && csu_cnt < 8'(MAX_CSU)) begin
                state <= S_INIT;
              end else begin
                if (any_open) error_q <= 1'b1;
                done_q <= 1'b1; irq_lo_q <= 1'b1;
              end
            end
          endcase
        end

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

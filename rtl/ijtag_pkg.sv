// ijtag_pkg: types and constants shared by the fault-management IJTAG design.
//
// It fixes three formats:
//  * network map ROM word (10 bits): [1:0] node type, [9:2] SIB jump offset or
//    register length. Encoding 00 = SIB, 01 = scan register, 11 = end of map;
//    10 is unused. Words are ordered from the node next to the network scan
//    output towards the scan input, and a register's instrument address is its
//    word number.
//  * network status RAM word (4 bits): [0] S (SIB open), [1] X (mask),
//    [2] C (corrected), [3] F (fault).
//  * the 32-bit IM_CMD register seen by the fault-management software. The
//    ROM and RAM layouts follow the map/status formats of the design; the
//    IM_CMD bit assignment and opcode values are this implementation's own.
//
// TABLE1_ROM is the map of the example network built by fmi_network.
package ijtag_pkg;

  typedef enum logic [1:0] {
    NODE_SIB = 2'b00,
    NODE_REG = 2'b01,
    NODE_UNUSED = 2'b10,
    NODE_END = 2'b11
  } node_type_e;

  typedef struct packed {
    logic [7:0] len;    // SIB: address jump when closed; register: length in bits
    node_type_e ntype;
  } rom_word_t;

  typedef struct packed {
    logic f;
    logic c;
    logic x;
    logic s;
  } ram_word_t;

  localparam int ROM_W = 10;
  localparam int ADDR_W = 8;

  // Operations the fault manager can request (IM_CMD[10:8]).
  typedef enum logic [2:0] {
    OP_NOP       = 3'd0,
    OP_READ      = 3'd1,
    OP_WRITE     = 3'd2,
    OP_OPEN      = 3'd3,
    OP_SET_X     = 3'd4,
    OP_CLOSE_ALL = 3'd5
  } im_op_e;

  // What the IM is doing during a capture-shift-update (CSU) sequence.
  typedef enum logic [1:0] {
    MODE_ACCESS = 2'd0,   // executing a command from the fault manager
    MODE_LOC    = 2'd1,   // autonomous fault localization
    MODE_CLOSE  = 2'd2    // closing every SIB
  } im_mode_e;

  // IM_CMD bit positions. Bits [15:0] are written by software, [31:16] are status.
  localparam int CMD_IA_LSB      = 0;   // [7:0]  instrument address
  localparam int CMD_OP_LSB      = 8;   // [10:8] operation
  localparam int CMD_CLOSE_AFTER = 11;  // close every SIB once the access is done
  localparam int CMD_START       = 12;  // write 1: start the operation
  localparam int CMD_ACK_HI      = 13;  // write 1: clear high-priority IRQ, re-arm localization
  localparam int CMD_ACK_LO      = 14;  // write 1: clear low-priority IRQ
  localparam int ST_BUSY         = 16;
  localparam int ST_DONE         = 17;
  localparam int ST_ABORTED      = 18;
  localparam int ST_ERROR        = 19;
  localparam int ST_LOC_VALID    = 20;
  localparam int ST_TOP_F        = 21;
  localparam int ST_TOP_C        = 22;
  localparam int ST_LOC_ACTIVE   = 23;
  localparam int ST_LOC_ADDR_LSB = 24;  // [31:24] localized instrument address

  function automatic logic [ROM_W-1:0] rom_entry(node_type_e t, int unsigned len);
    rom_word_t w;
    w.ntype = t;
    w.len   = 8'(len);
    return w;
  endfunction

  // Map of the example network: word 0 is nearest the scan output.
  //   0 SIB2 (jump 5), 1 SIB4 (jump 2), 2 R3 (32 bits), 3 SIB3 (jump 2),
  //   4 R2 (16 bits), 5 SIB1 (jump 2), 6 R1 (32 bits), 7 END
  localparam int TABLE1_DEPTH = 8;
  localparam logic [TABLE1_DEPTH*ROM_W-1:0] TABLE1_ROM = {
    rom_entry(NODE_END, 0),
    rom_entry(NODE_REG, 32),
    rom_entry(NODE_SIB, 2),
    rom_entry(NODE_REG, 16),
    rom_entry(NODE_SIB, 2),
    rom_entry(NODE_REG, 32),
    rom_entry(NODE_SIB, 2),
    rom_entry(NODE_SIB, 5)
  };

endpackage

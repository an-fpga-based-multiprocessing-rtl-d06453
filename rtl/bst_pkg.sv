// bst_pkg: constants, instruction encoding and shared types of the BST master
// main FPGA logic.
//
// The sizes that come from the design description are the eight tasks, the
// eight 16-bit local registers per task (64 task registers in all), the three
// 16-bit global registers, the 32-byte message with one enable and one
// auto-clear bit per byte, 16 external event inputs and the 512 kByte task
// code SRAM. The instruction encoding, the register map and the status codes
// are this design's own: the description lists only the instruction
// categories (arithmetic/logic, program counter, interrupt, message
// transmission and wait) and the status conditions a task can be in.
//
// Instruction word (32 bits, two 16-bit SRAM words, high word first):
//   [31:26] opcode   [25:22] rd   [21:18] rs   [17:16] unused   [15:0] imm
// Register numbers 0..7 are the task's local registers, 8 is the turn
// number (read only), 9 the external triggers (read only) and 10 the
// internal triggers; 11..15 are illegal.
package bst_pkg;

  localparam int NTASKS        = 8;
  localparam int TASK_W        = 3;
  localparam int REGS_PER_TASK = 8;
  localparam int DATA_W        = 16;
  localparam int MSG_BYTES     = 32;
  localparam int MSG_IDX_W     = 5;
  localparam int EXT_TRIG_W    = 16;
  localparam int PC_W          = 16;
  localparam int SRAM_AW       = 18;   // 256 k x 16 bit = 512 kByte
  localparam int SRAM_DW       = 16;
  localparam int BUS_AW        = 20;   // internal word address of the VME window
  localparam int UTC_BYTES     = 4;    // UTC seconds inserted into the message

  // Register numbers of the global registers.
  localparam logic [3:0] REG_TURN = 4'd8;
  localparam logic [3:0] REG_EXT  = 4'd9;
  localparam logic [3:0] REG_INT  = 4'd10;

  typedef enum logic [5:0] {
    OP_NOP   = 6'h00,
    // arithmetic and logical operations
    OP_LDI   = 6'h01,  // rd = imm
    OP_MOV   = 6'h02,  // rd = rs
    OP_ADD   = 6'h03,  // rd = rd + rs
    OP_ADDI  = 6'h04,  // rd = rd + imm
    OP_SUB   = 6'h05,  // rd = rd - rs
    OP_SUBI  = 6'h06,  // rd = rd - imm
    OP_INC   = 6'h07,  // rd = rd + 1
    OP_DEC   = 6'h08,  // rd = rd - 1
    OP_AND   = 6'h09,
    OP_ANDI  = 6'h0A,
    OP_OR    = 6'h0B,
    OP_ORI   = 6'h0C,
    OP_XOR   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_SHL   = 6'h0F,  // rd = rd << imm[3:0]
    OP_SHR   = 6'h10,  // rd = rd >> imm[3:0]
    // program counter instructions
    OP_JMP   = 6'h18,  // pc = imm
    OP_BEQ   = 6'h19,  // if rd == rs: pc = imm
    OP_BNE   = 6'h1A,  // if rd != rs: pc = imm
    OP_BZ    = 6'h1B,  // if rd == 0 : pc = imm
    OP_BNZ   = 6'h1C,  // if rd != 0 : pc = imm
    // interrupt instruction
    OP_IRQ   = 6'h20,  // VME interrupt with status/ID imm[7:0]
    // message transmission
    OP_SEND  = 6'h28,  // next_msg[imm[4:0]] = rd[7:0], enable bit set
    OP_SENDI = 6'h29,  // next_msg[imm[12:8]] = imm[7:0], enable bit set
    OP_RDMSG = 6'h2A,  // rd = present_msg[imm[4:0]]
    // wait and trigger instructions
    OP_WEXT  = 6'h30,  // wait until (ext & imm) != 0
    OP_WINT  = 6'h31,  // wait until (int & imm) != 0
    OP_SETT  = 6'h32,  // int |= imm
    OP_CLRT  = 6'h33,  // int &= ~imm
    OP_WTREL = 6'h34,  // wait until turn == turn_now + imm
    OP_WTABS = 6'h35,  // wait until turn == imm
    OP_WTREG = 6'h36,  // wait until turn == rd
    OP_WPPS  = 6'h37,  // wait for the next pulse per second
    OP_WSYNC = 6'h38,  // wait for the next Sync pulse
    OP_STOP  = 6'h3F   // task stops itself
  } opcode_e;

  // Task situation as reported to the CBCM through the status register.
  typedef enum logic [2:0] {
    TS_STOPPED = 3'd0,
    TS_RUNNING = 3'd1,
    TS_WAITING = 3'd2,
    TS_ILL_CMD = 3'd3,
    TS_ILL_VAL = 3'd4,
    TS_ILL_REG = 3'd5
  } task_state_e;

  typedef enum logic [2:0] {
    W_NONE = 3'd0,
    W_EXT  = 3'd1,
    W_INT  = 3'd2,
    W_TURN = 3'd3,
    W_PPS  = 3'd4,
    W_SYNC = 3'd5
  } wait_kind_e;

  // Output of the decoder.
  typedef struct packed {
    opcode_e     op;
    logic [3:0]  rd;
    logic [3:0]  rs;
    logic [15:0] imm;
    logic        illegal_op;   // undefined opcode
    logic        illegal_reg;  // register number not allowed for this use
    logic        reads_rd;
    logic        reads_rs;
    logic        writes_rd;
  } decoded_t;

  // Update of one task's situation requested by the execution block.
  typedef struct packed {
    logic              valid;
    logic [TASK_W-1:0] task_id;
    task_state_e       state;
    wait_kind_e        wkind;
    logic [15:0]       warg;
  } status_upd_t;

  // Register bus from the address decoder to the register blocks.
  typedef struct packed {
    logic        wr;
    logic [4:0]  addr;
    logic [15:0] wdata;
  } reg_req_t;

  // Register map (word index inside the register region).
  localparam logic [4:0] RA_CTRL       = 5'd0;
  localparam logic [4:0] RA_TASK_EN    = 5'd1;
  localparam logic [4:0] RA_MSG_LEN    = 5'd2;
  localparam logic [4:0] RA_UTC_POS    = 5'd3;
  localparam logic [4:0] RA_EN_LO      = 5'd4;
  localparam logic [4:0] RA_EN_HI      = 5'd5;
  localparam logic [4:0] RA_ACLR_LO    = 5'd6;
  localparam logic [4:0] RA_ACLR_HI    = 5'd7;
  localparam logic [4:0] RA_STATUS_LO  = 5'd8;
  localparam logic [4:0] RA_STATUS_HI  = 5'd9;
  localparam logic [4:0] RA_TURN       = 5'd10;
  localparam logic [4:0] RA_EXT        = 5'd11;
  localparam logic [4:0] RA_INT        = 5'd12;
  localparam logic [4:0] RA_UTC_LD_LO  = 5'd13;
  localparam logic [4:0] RA_UTC_LD_HI  = 5'd14;
  localparam logic [4:0] RA_UTC_ARM    = 5'd15;
  localparam logic [4:0] RA_UTC_LO     = 5'd16;
  localparam logic [4:0] RA_UTC_HI     = 5'd17;
  localparam logic [4:0] RA_TASK_START = 5'd24;  // 24..31: start address of task 0..7

  function automatic logic [31:0] mk_instr(opcode_e op, logic [3:0] rd, logic [3:0] rs,
                                           logic [15:0] imm);
    return {op, rd, rs, 2'b00, imm};
  endfunction

endpackage

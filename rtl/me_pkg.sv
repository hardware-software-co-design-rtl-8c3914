// me_pkg: types and constants shared by the APB motion-estimation core.
//
// The core is a small motion-estimation processor (ASIP) behind an AMBA-2.0
// APB slave. This package holds its instruction encoding, the register map of
// the bus interface, the memory-select codes of the upload Address register
// and the block geometry helpers. The register set (set/clear control,
// status, Address, Data Input, Data Output, MV x, MV y, SAD, hidden debug
// registers) follows the published programming model; the offsets, bit
// assignments and the instruction encoding are this design's own choice.
package me_pkg;

  // ---------------------------------------------------------------------
  // Instruction set. Every instruction is one 32-bit word:
  //   [31:28] opcode  [27:25] rd  [24:22] ra  [21:19] rb  [18:16] unused
  //   [15:0]  imm (sign-extended for LDI/ADDI, branch target for jumps,
  //           block selection for BLK)
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // no operation
    OP_LDI  = 4'd1,   // rd = imm
    OP_ADD  = 4'd2,   // rd = ra + rb
    OP_ADDI = 4'd3,   // rd = ra + imm
    OP_SUB  = 4'd4,   // rd = ra - rb
    OP_BLT  = 4'd5,   // if (ra <  rb) pc = imm   (signed)
    OP_BGE  = 4'd6,   // if (ra >= rb) pc = imm   (signed)
    OP_BEQ  = 4'd7,   // if (ra == rb) pc = imm
    OP_BNE  = 4'd8,   // if (ra != rb) pc = imm
    OP_JMP  = 4'd9,   // pc = imm
    OP_SAD  = 4'd10,  // evaluate candidate MV (ra, rb); keep it if better
    OP_CLRB = 4'd11,  // best SAD = maximum, best MV = (0,0)
    OP_GBX  = 4'd12,  // rd = best MV x
    OP_GBY  = 4'd13,  // rd = best MV y
    OP_HALT = 4'd14,  // stop, signal done
    OP_BLK  = 4'd15   // select block size and sub-block position (blk_imm_t)
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [2:0]  rd;
    logic [2:0]  ra;
    logic [2:0]  rb;
    logic [2:0]  unused;
    logic [15:0] imm;
  } instr_t;

  // Immediate of OP_BLK: the block matched by SAD. Width and height are
  // MB_SIZE >> wsel and MB_SIZE >> hsel (codes 0..2: 16, 8, 4 pixels for a
  // 16x16 macroblock; code 3 acts as 2); the sub-block's top-left corner in
  // the macroblock is (4*off_x4, 4*off_y4). START selects the whole block.
  typedef struct packed {
    logic [3:0] unused;
    logic [3:0] off_y4;
    logic [3:0] off_x4;
    logic [1:0] hsel;
    logic [1:0] wsel;
  } blk_imm_t;

  // ---------------------------------------------------------------------
  // APB register map (byte offsets inside the core's 256-byte window).
  // ---------------------------------------------------------------------
  localparam logic [7:0] REG_CTRL_SET = 8'h00;  // W: set control bits, R: control
  localparam logic [7:0] REG_CTRL_CLR = 8'h04;  // W: clear control bits, R: control
  localparam logic [7:0] REG_STATUS   = 8'h08;  // R: status
  localparam logic [7:0] REG_ADDRESS  = 8'h0C;  // RW: upload address
  localparam logic [7:0] REG_DATA_IN  = 8'h10;  // W: store word at Address, Address++
  localparam logic [7:0] REG_DATA_OUT = 8'h14;  // R: word at Address, Address++
  localparam logic [7:0] REG_MV_X     = 8'h18;  // R: best MV x (sign-extended)
  localparam logic [7:0] REG_MV_Y     = 8'h1C;  // R: best MV y (sign-extended)
  localparam logic [7:0] REG_SAD      = 8'h20;  // R: best SAD
  // Reserved region: in-circuit emulator (debug) registers.
  localparam logic [7:0] REG_ICE_CMD  = 8'h40;  // W: command code (ice_cmd_e)
  localparam logic [7:0] REG_ICE_GOTO = 8'h44;  // RW: goto target PC
  localparam logic [7:0] REG_ICE_BP0  = 8'h48;  // RW: [31] enable, [15:0] PC
  localparam logic [7:0] REG_ICE_BP1  = 8'h4C;  // RW: [31] enable, [15:0] PC
  localparam logic [7:0] REG_ICE_PC   = 8'h50;  // R: PC of the stopped core
  localparam logic [7:0] REG_ICE_RSEL = 8'h54;  // RW: [2:0] processor register to show
  localparam logic [7:0] REG_ICE_RVAL = 8'h58;  // R: that register of the stopped core (sign-extended)

  // Control register bits.
  localparam int CTRL_START = 0;  // self-clearing: restart firmware at PC 0
  localparam int CTRL_RESET = 1;  // hold the ME processor in reset
  localparam int CTRL_BANK  = 2;  // pixel bank read by the processor; the bus uses the other

  // Status register bits.
  localparam int STAT_BUSY  = 0;  // a command is in flight or the core runs
  localparam int STAT_DONE  = 1;  // firmware executed HALT
  localparam int STAT_BREAK = 2;  // stopped by a breakpoint, a step or stop
  localparam int STAT_CMD   = 3;  // a command has not yet reached the ME clock domain

  // Commands carried from the bus clock domain into the ME clock domain.
  typedef enum logic [2:0] {
    CMD_NONE  = 3'd0,
    CMD_RUN   = 3'd1,
    CMD_STOP  = 3'd2,
    CMD_STEP  = 3'd3,
    CMD_GOTO  = 3'd4,
    CMD_START = 3'd5
  } ice_cmd_e;

  // Memory select, Address register bits [13:12]; bits [11:0] are the word index.
  typedef enum logic [1:0] {
    MEM_PROG = 2'd0,
    MEM_MB   = 2'd1,
    MEM_SA   = 2'd2
  } mem_sel_e;

endpackage

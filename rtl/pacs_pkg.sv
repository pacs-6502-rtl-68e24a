// pacs_pkg: types and constants shared by the PACS 6502 modules.
//
// The 6502 encodes every instruction that references memory as aaabbbcc:
// cc selects the instruction group, aaa the operation inside the group and
// bbb the addressing mode. The decoder turns that into the enums below; the
// CPU sequencer only looks at the decoded fields. The ALU operations match
// the ALU's enable lines (sum, AND, OR, XOR, shift right), with subtraction
// added as its own operation. The host command codes (RESET_CPU, START_CPU,
// PAUSE_CPU, WRITE_MEM) are the values the host software writes into the
// command byte of the controller.
package pacs_pkg;

  // ALU operations. SUB computes a + ~b + carry_in, the 6502 SBC/CMP form.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_AND = 3'd1,
    ALU_OR  = 3'd2,
    ALU_EOR = 3'd3,
    ALU_SR  = 3'd4,
    ALU_SUB = 3'd5
  } alu_op_e;

  // Instruction operations of the three groups (cc = 01, 10, 00).
  typedef enum logic [4:0] {
    OP_NOP, // any opcode outside the three tables
    OP_ORA, OP_AND, OP_EOR, OP_ADC, OP_STA, OP_LDA, OP_CMP, OP_SBC,
    OP_ASL, OP_ROL, OP_LSR, OP_ROR, OP_STX, OP_LDX, OP_DEC, OP_INC,
    OP_BIT, OP_JMP, OP_JMPI, OP_STY, OP_LDY, OP_CPY, OP_CPX
  } op_e;

  // Addressing modes. JMPI is the absolute indirect mode of JMP (abs).
  typedef enum logic [3:0] {
    AM_IMP,  // no operand (one-byte no-operation)
    AM_ACC,  // accumulator
    AM_IMM,  // # immediate
    AM_ZP,   // zero page
    AM_ZPX,  // zero page, X
    AM_ZPY,  // zero page, Y (LDX/STX)
    AM_ABS,  // absolute
    AM_ABSX, // absolute, X
    AM_ABSY, // absolute, Y
    AM_INDX, // (zero page, X)
    AM_INDY  // (zero page), Y
  } amode_e;

  // What the final bus access of an instruction does.
  typedef enum logic [2:0] {
    K_NOP,   // nothing
    K_READ,  // read an operand, result written back at the next fetch
    K_STORE, // write a register
    K_RMW,   // read, modify, write back
    K_JMP    // load the program counter
  } kind_e;

  // Register an instruction reads as its first ALU operand or stores.
  typedef enum logic [1:0] {
    R_A, R_X, R_Y, R_NONE
  } reg_e;

  typedef struct packed {
    op_e    op;
    amode_e am;
    kind_e  kind;
    reg_e   rsrc;  // register operand / store source
    reg_e   rdst;  // register written back (R_NONE: flags only or memory)
  } dec_t;

  // Status register bit positions (N V - B D I Z C); D and I are never
  // changed by the implemented instructions.
  localparam int P_C = 0;
  localparam int P_Z = 1;
  localparam int P_V = 6;
  localparam int P_N = 7;
  localparam logic [7:0] P_RESET = 8'h20; // bit 5 always reads as one

  // Host commands, carried in the upper byte of a 16-bit host write.
  typedef enum logic [7:0] {
    CMD_RESET_CPU = 8'd0,
    CMD_START_CPU = 8'd1,
    CMD_PAUSE_CPU = 8'd2,
    CMD_WRITE_MEM = 8'd3
  } cmd_e;

  // Who owns the memory port, readable by the host.
  typedef enum logic [1:0] {
    MODE_HOST   = 2'd0, // CPU held in reset, host owns memory
    MODE_RUN    = 2'd1, // CPU runs and owns memory
    MODE_PAUSED = 2'd2  // CPU frozen mid-program, host owns memory
  } mode_e;

endpackage

// bzk_pkg: instruction set and control types of the BZK.SAU.FPGA CPU.
//
// The CPU is a 16-bit accumulator machine: AC is the accumulator, DR the data
// register that supplies the ALU's second operand, AR the memory address
// register, PC, IR, SP (stack pointer), IX (index register), TR (temporary
// register, which receives the high half of a product or the remainder of a
// division) and CCR (condition codes). The mnemonics and their register
// transfers follow the published instruction summary; the binary encoding
// below is this design's own, since none is published.
//
// Instruction word (16 bits):
//   [15:11] opcode
//   [10]    X: 0 = PC-relative, 1 = IX-relative effective address
//   [9:0]   signed word offset; EA = (X ? IX : PC) + 2*offset, with PC
//           already pointing at the next instruction.
//   LDI uses [10:0] as a signed 11-bit literal.
// Memory is byte addressed and big-endian; words sit at even addresses.
package bzk_pkg;

  typedef enum logic [4:0] {
    OP_NOP = 5'h00,
    OP_LDA = 5'h01,  // AC <- M[EA]
    OP_STA = 5'h02,  // M[EA] <- AC
    OP_LDD = 5'h03,  // DR <- M[EA]
    OP_ADD = 5'h04,  // AC <- AC + DR
    OP_SUB = 5'h05,  // AC <- AC - DR
    OP_AND = 5'h06,  // AC <- AC & DR
    OP_OR  = 5'h07,  // AC <- AC | DR
    OP_XOR = 5'h08,  // AC <- AC ^ DR
    OP_SHR = 5'h09,  // AC <- AC >> 1 (logical)
    OP_SHL = 5'h0A,  // AC <- AC << 1
    OP_INC = 5'h0B,  // AC <- AC + 1
    OP_NEG = 5'h0C,  // AC <- ~AC + 1
    OP_MUL = 5'h0D,  // {TR, AC} <- AC * DR (signed)
    OP_DIV = 5'h0E,  // AC <- AC / DR, TR <- AC % DR (signed)
    OP_BRA = 5'h0F,  // PC <- EA
    OP_BZR = 5'h10,  // PC <- EA if Z
    OP_BMI = 5'h11,  // PC <- EA if N
    OP_JMP = 5'h12,  // M[SP] <- PC, SP <- SP - 2, PC <- EA (subroutine call)
    OP_RTS = 5'h13,  // SP <- SP + 2, PC <- M[SP]
    OP_LDI = 5'h14,  // AC <- sign-extended literal
    OP_TDR = 5'h15,  // DR <- AC
    OP_TRA = 5'h16,  // AC <- TR
    OP_TAX = 5'h17,  // IX <- AC
    OP_TXA = 5'h18,  // AC <- IX
    OP_TAS = 5'h19,  // SP <- AC
    OP_HLT = 5'h1F   // stop
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic        x;
    logic [9:0]  offset;
  } instr_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHR, ALU_SHL,
    ALU_INC, ALU_NEG, ALU_MUL, ALU_DIV
  } alu_op_e;

  // Condition code register; bit order {V, C, N, Z} in the low nibble.
  typedef struct packed {
    logic v;
    logic c;
    logic n;
    logic z;
  } flags_t;

  // Sources of the common bus.
  typedef enum logic [3:0] {
    BUS_AC, BUS_DR, BUS_PC, BUS_SP, BUS_IX, BUS_TR, BUS_MEM, BUS_EA, BUS_IMM, BUS_SP_INC
  } bus_src_e;

  // Control word issued by the control unit every cycle.
  typedef struct packed {
    bus_src_e bus_src;
    logic     ar_ld;
    logic     pc_ld;     // PC <- bus
    logic     pc_ea;     // PC <- EA (branches, JMP)
    logic     pc_inc;
    logic     ir_ld;
    logic     ac_ld;     // AC <- bus
    logic     alu_ld;    // AC <- ALU result, CCR <- ALU flags
    logic     tr_ld;     // TR <- ALU high result (MUL, DIV)
    logic     dr_ld;
    logic     ix_ld;
    logic     sp_ld;
    logic     sp_dec;
    logic     mem_we;    // M[AR] <- bus
    alu_op_e  alu_op;
  } ctrl_t;

  typedef enum logic [2:0] {
    ST_FETCH_A,   // AR <- PC
    ST_FETCH_R,   // memory reads M[AR]
    ST_DECODE,    // IR <- M[AR], PC <- PC + 2
    ST_EXEC,      // execute or start the operand access
    ST_MEM_R,     // memory reads M[AR]
    ST_MEM_WB,    // destination <- M[AR]
    ST_MEM_W,     // M[AR] <- bus
    ST_HALT
  } state_e;

endpackage

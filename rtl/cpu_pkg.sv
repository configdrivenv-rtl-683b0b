// cpu_pkg: types and constants shared by the 16-bit processor and its testbenches.
//
// Instruction word (16 bits): [15:12] opcode, [11:10] unused, [9:8] destination
// register rd, [7:0] signed 8-bit immediate. The field positions and the opcode
// values (NOP=0x0, ADD=0x1, SUB=0x2, MOV=0x3, XOR=0x4, HALT=0xF) are the
// processor's published encoding; treating bits [11:10] as don't-care and the
// unlisted opcodes 0x5..0xE as NOP are this design's own choices.
package cpu_pkg;

  localparam int unsigned XLEN    = 16;  // register width
  localparam int unsigned NREGS   = 4;   // r0..r3
  localparam int unsigned PC_W    = 8;   // program counter width
  localparam int unsigned IMM_W   = 8;   // immediate width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PC_W-1:0] pc_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_ADD  = 4'h1,
    OP_SUB  = 4'h2,
    OP_MOV  = 4'h3,
    OP_XOR  = 4'h4,
    OP_HALT = 4'hF
  } opcode_t;

  typedef struct packed {
    logic [3:0]       opcode;  // kept as raw bits so unlisted codes survive a cast
    logic [1:0]       unused;
    logic [1:0]       rd;
    logic [IMM_W-1:0] imm;
  } instr_t;

  // Sign-extend the 8-bit immediate to the register width.
  function automatic word_t sext_imm(logic [IMM_W-1:0] imm);
    return {{(XLEN-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

  // Build an instruction word.
  function automatic logic [15:0] encode(opcode_t op, logic [1:0] rd, logic [7:0] imm);
    return {op, 2'b00, rd, imm};
  endfunction

endpackage

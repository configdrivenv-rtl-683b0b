// simple_cpu: a 16-bit RISC-style processor with four 16-bit registers, an
// 8-bit program counter and a single-cycle execution datapath.
//
// The processor has no instruction memory of its own: the instruction word is
// presented on `instr` and is executed at the next rising clock edge, one
// instruction per clock. Each executed instruction updates at most one
// register and advances `pc` by one:
//   NOP  (0x0)  no register change
//   ADD  (0x1)  rd <- rd + sext(imm)
//   SUB  (0x2)  rd <- rd - sext(imm)
//   MOV  (0x3)  rd <- sext(imm)
//   XOR  (0x4)  rd <- rd ^ sext(imm)
//   HALT (0xF)  halt <- 1; the processor then ignores `instr` until reset
// Arithmetic wraps modulo 2^16. The register contents and the PC are visible
// on r0..r3 and pc right after the clock edge that executed the instruction.
//
// Interface: clk, rst (active high, synchronous: all registers, the PC and
// halt go to 0), instr[15:0]; outputs pc[7:0], halt, r0..r3[15:0].
//
// The register file, PC width, instruction set, field layout, 16-bit wrap and
// the sign-extended immediate follow the published processor. The two-state
// RUN/HALTED control, the PC holding on HALT, the synchronous reset and the
// treatment of unlisted opcodes as NOP are this design's own choices.
module simple_cpu
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] instr,
  output pc_t         pc,
  output logic        halt,
  output word_t       r0,
  output word_t       r1,
  output word_t       r2,
  output word_t       r3
);

  typedef enum logic {S_RUN = 1'b0, S_HALTED = 1'b1} state_t;

  state_t state;
  word_t  regs [NREGS];
  instr_t ir;
  word_t  simm;
  word_t  rd_val;
  word_t  result;
  logic   wr_en;

  assign ir     = instr_t'(instr);
  assign simm   = sext_imm(ir.imm);
  assign rd_val = regs[ir.rd];

  // Execute stage: compute the result for the destination register.
  always_comb begin
    result = rd_val;
    wr_en  = 1'b0;
    unique case (ir.opcode)
      OP_ADD:  begin result = rd_val + simm; wr_en = 1'b1; end
      OP_SUB:  begin result = rd_val - simm; wr_en = 1'b1; end
      OP_MOV:  begin result = simm;          wr_en = 1'b1; end
      OP_XOR:  begin result = rd_val ^ simm; wr_en = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RUN;
      pc    <= '0;
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (state == S_RUN) begin
      if (ir.opcode == OP_HALT) begin
        state <= S_HALTED;
      end else begin
        pc <= pc + 1'b1;
        if (wr_en) regs[ir.rd] <= result;
      end
    end
  end

  assign halt = (state == S_HALTED);
  assign r0   = regs[0];
  assign r1   = regs[1];
  assign r2   = regs[2];
  assign r3   = regs[3];

  // Once halted, nothing changes until reset.
  a_halt_freezes: assert property (@(posedge clk) disable iff (rst)
    halt |=> (halt && $stable(pc) && $stable(r0) && $stable(r1) && $stable(r2) && $stable(r3)))
    else $error("simple_cpu: state changed while halted");

endmodule

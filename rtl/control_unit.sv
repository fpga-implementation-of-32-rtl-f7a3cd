// control_unit -- instruction decoder of the decode stage.
//
// Turns one 32-bit instruction word into the control word (mips_pkg::ctrl_t)
// that travels down the pipeline, plus the sign-extended immediate. It is
// purely combinational.
//
// R-type (opcode 0): rd <- rs op rt, the operation chosen by the function
// value (ADD, SUB, MUL, AND, OR, NOR, NAND, XOR, DIV, SLT). I-type arithmetic
// (opcodes 1-10) uses the same numbering with the immediate in place of rt and
// writes the register in [20:16]. SLL/SRL shift rs by the low five immediate
// bits. Branches compare rs with the immediate and, when the condition holds,
// jump to the address held in the register of field [20:16]; this reading
// follows the branch actions of the instruction table literally. J and JAL
// take the 26-bit field shifted left by two. JAL adds 4 to $ra (register 31)
// and pushes the return address at the new $ra; JR (register in rs) pops the
// target from the stack at rs and writes rs - 4 back.
//
// This design's own choices: every immediate is sign-extended; LW/SW (opcodes
// 11/12) address memory at rs + immediate and load into / store from the
// register of field [20:16]; unknown opcodes and function values decode to a
// bubble (valid = 0, no side effects).
module control_unit
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic [31:0] imm_sext
);

  logic [5:0] opcode, funct;
  logic [4:0] rs, rt, rd;
  logic [5:0] code;  // function value (R-type) or opcode (I-type arithmetic)

  assign opcode   = instr[31:26];
  assign rs       = instr[25:21];
  assign rt       = instr[20:16];
  assign rd       = instr[15:11];
  assign funct    = instr[5:0];
  assign imm_sext = {{16{instr[15]}}, instr[15:0]};
  assign code     = (opcode == OP_RTYPE) ? funct : opcode;

  // Shared arithmetic decoding of function values and I-type opcodes 1..10.
  function automatic logic arith_known(input logic [5:0] c);
    return (c >= 6'd1) && (c <= 6'd10);
  endfunction

  always_comb begin
    ctrl = CTRL_NOP;
    if (opcode == OP_RTYPE || (opcode >= OP_ADDI && opcode <= OP_SLTI)) begin
      if (arith_known(code)) begin
        ctrl.valid     = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dest      = (opcode == OP_RTYPE) ? rd : rt;
        ctrl.b_sel     = (opcode == OP_RTYPE) ? B_REG : B_IMM;
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = (opcode == OP_RTYPE);
        unique case (code)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_MUL:  ctrl.md_op  = MD_MUL;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_NAND: ctrl.alu_op = ALU_NAND;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_DIV:  ctrl.md_op  = MD_DIV;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
    end else begin
      unique case (opcode)
        OP_LW: begin
          ctrl.valid = 1'b1; ctrl.reg_write = 1'b1; ctrl.dest = rt;
          ctrl.b_sel = B_IMM; ctrl.mem_read = 1'b1; ctrl.uses_rs = 1'b1;
        end
        OP_SW: begin
          ctrl.valid = 1'b1; ctrl.b_sel = B_IMM; ctrl.mem_write = 1'b1;
          ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
        end
        OP_BEQ, OP_BNE, OP_BGT, OP_BLT: begin
          ctrl.valid = 1'b1; ctrl.b_sel = B_IMM; ctrl.alu_op = ALU_SUB;
          ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
          ctrl.branch = (opcode == OP_BEQ) ? BR_EQ :
                        (opcode == OP_BNE) ? BR_NE :
                        (opcode == OP_BGT) ? BR_GT : BR_LT;
        end
        OP_SLL, OP_SRL: begin
          ctrl.valid = 1'b1; ctrl.reg_write = 1'b1; ctrl.dest = rt;
          ctrl.b_sel = B_IMM; ctrl.uses_rs = 1'b1;
          ctrl.alu_op = (opcode == OP_SLL) ? ALU_SLL : ALU_SRL;
        end
        OP_J: begin
          ctrl.valid = 1'b1; ctrl.jump = 1'b1;
        end
        OP_JAL: begin
          // $ra <- $ra + 4 ; MEM[$ra + 4] <- return address
          ctrl.valid = 1'b1; ctrl.jump = 1'b1; ctrl.link = 1'b1;
          ctrl.reg_write = 1'b1; ctrl.dest = 5'(RA_REG);
          ctrl.alu_op = ALU_ADD; ctrl.b_sel = B_FOUR; ctrl.mem_write = 1'b1;
          ctrl.uses_rs = 1'b1;  // rs operand is forced to $ra by the core
        end
        OP_JR: begin
          // PC <- MEM[rs] ; rs <- rs - 4
          ctrl.valid = 1'b1; ctrl.jr = 1'b1; ctrl.mem_read = 1'b1;
          ctrl.addr_rs = 1'b1; ctrl.reg_write = 1'b1; ctrl.dest = rs;
          ctrl.alu_op = ALU_SUB; ctrl.b_sel = B_FOUR; ctrl.uses_rs = 1'b1;
        end
        default: ctrl = CTRL_NOP;
      endcase
    end
  end

endmodule

// mips_pkg -- instruction-set definitions shared by the processor blocks.
//
// Instructions are 32 bits wide with a 6-bit opcode in [31:26]. R-type words
// carry rs [25:21], rt [20:16], rd [15:11], shamt [10:6] and a function value
// in [5:0]; I-type words carry rs [25:21], a destination/second register in
// [20:16] and a 16-bit immediate in [15:0]; J-type words carry a 26-bit word
// address in [25:0]. The opcode and function-value numbers below are the ones
// of the instruction tables this processor implements. Opcodes 11 and 12 are
// given to LW and SW, the load and store the pipeline supports; that numbering
// is this design's own choice, filling the two unused codes between SLTI and
// BEQ. The ALU operation and control-word encodings are internal choices.
package mips_pkg;

  localparam int RA_REG = 31;  // $ra: stack pointer used by JAL

  typedef enum logic [5:0] {
    OP_RTYPE = 6'd0,
    OP_ADDI  = 6'd1,
    OP_SUBI  = 6'd2,
    OP_MULI  = 6'd3,
    OP_ANDI  = 6'd4,
    OP_ORI   = 6'd5,
    OP_NORI  = 6'd6,
    OP_NANDI = 6'd7,
    OP_XORI  = 6'd8,
    OP_DIVI  = 6'd9,
    OP_SLTI  = 6'd10,
    OP_LW    = 6'd11,
    OP_SW    = 6'd12,
    OP_BEQ   = 6'd13,
    OP_BNE   = 6'd14,
    OP_BGT   = 6'd15,
    OP_BLT   = 6'd16,
    OP_SLL   = 6'd17,
    OP_SRL   = 6'd18,
    OP_J     = 6'd19,
    OP_JAL   = 6'd20,
    OP_JR    = 6'd21
  } opcode_e;

  typedef enum logic [5:0] {
    FN_ADD  = 6'd1,
    FN_SUB  = 6'd2,
    FN_MUL  = 6'd3,
    FN_AND  = 6'd4,
    FN_OR   = 6'd5,
    FN_NOR  = 6'd6,
    FN_NAND = 6'd7,
    FN_XOR  = 6'd8,
    FN_DIV  = 6'd9,
    FN_SLT  = 6'd10
  } funct_e;

  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_NOR,
    ALU_NAND,
    ALU_XOR,
    ALU_SLT,
    ALU_SLL,
    ALU_SRL
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE,
    BR_EQ,
    BR_NE,
    BR_GT,
    BR_LT
  } branch_e;

  typedef enum logic [1:0] {
    MD_NONE,
    MD_MUL,
    MD_DIV
  } md_op_e;

  // B operand of ALU 1
  typedef enum logic [1:0] {
    B_REG,    // rt register value
    B_IMM,    // sign-extended immediate
    B_FOUR    // constant 4 (stack pointer step of JAL / JR)
  } bsel_e;

  // Decoded control word carried down the pipeline.
  typedef struct packed {
    logic     valid;      // a real instruction (not a bubble, not an unknown code)
    logic     reg_write;  // writes register `dest`
    logic [4:0] dest;
    alu_op_e  alu_op;
    bsel_e    b_sel;
    md_op_e   md_op;      // handled by the dedicated ALU 2
    logic     mem_read;   // LW: write-back value comes from data memory
    logic     mem_write;  // SW or JAL stack push
    logic     link;       // JAL: store data is the return address
    logic     addr_rs;    // JR: memory address is the rs value, not the ALU result
    branch_e  branch;     // compare rs with immediate, target is the rt value
    logic     jump;       // J / JAL: target from the 26-bit field, resolved in ID
    logic     jr;         // JR: target read from the stack, resolved in MEM
    logic     uses_rs;
    logic     uses_rt;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    valid: 1'b0, reg_write: 1'b0, dest: 5'd0, alu_op: ALU_ADD, b_sel: B_REG,
    md_op: MD_NONE, mem_read: 1'b0, mem_write: 1'b0, link: 1'b0, addr_rs: 1'b0,
    branch: BR_NONE, jump: 1'b0, jr: 1'b0, uses_rs: 1'b0, uses_rt: 1'b0
  };

  // One-cycle event flags of the pipeline, brought out for observation.
  typedef struct packed {
    logic fwd_exmem;      // an EX operand was taken from EX/MEM
    logic fwd_memwb;      // an EX operand was taken from MEM/WB
    logic load_use_stall; // decode held one cycle behind a load
    logic md_stall;       // pipeline held by ALU 2 (multiply/divide)
    logic mul_start;      // Booth multiplication started
    logic div_start;      // division started
    logic branch_taken;   // conditional branch taken in EX
    logic jump;           // J/JAL redirected fetch from decode
    logic jr_return;      // JR redirected fetch from the stack in MEM
    logic retire;         // an instruction left write-back
  } events_t;

endpackage

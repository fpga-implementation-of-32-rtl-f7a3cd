// tb_asm_pkg -- instruction encoders and a reference instruction-set model
// used by the processor testbenches.
//
// The encoders build the three instruction formats. iss_step() executes one
// instruction on an architectural state (PC, registers, data memory) with no
// pipeline at all; the pipeline testbenches compare the processor's
// register-write stream and final state with it.
package tb_asm_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] r_type(funct_e f, int rs, int rt, int rd);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, f};
  endfunction

  function automatic logic [31:0] i_type(opcode_e op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] j_type(opcode_e op, int word_addr);
    return {op, 26'(word_addr)};
  endfunction

  localparam int DMEM_WORDS = 1024;

  typedef struct {
    logic [31:0] pc;
    logic [31:0] regs [32];
    logic [31:0] dmem [DMEM_WORDS];
  } arch_t;

  function automatic logic [31:0] ref_div(logic [31:0] a, logic [31:0] b);
    if (b == 0) return '1;
    if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) return 32'h8000_0000;
    return $signed(a) / $signed(b);
  endfunction

  function automatic logic [31:0] arith(int code, logic [31:0] a, logic [31:0] b);
    logic [63:0] p;
    case (code)
      1:  return a + b;
      2:  return a - b;
      3:  begin p = $signed(a) * $signed(b); return p[31:0]; end
      4:  return a & b;
      5:  return a | b;
      6:  return ~(a | b);
      7:  return ~(a & b);
      8:  return a ^ b;
      9:  return ref_div(a, b);
      10: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      default: return 'x;
    endcase
  endfunction

  // Execute one instruction. Returns 1 and the destination/value when a
  // register other than 0 is written.
  function automatic logic iss_step(ref arch_t s, input logic [31:0] ins,
                                    output logic [4:0] wd, output logic [31:0] wv);
    logic [5:0]  op;
    logic [4:0]  rs, rt, rd;
    logic [31:0] imm, a, b, npc;
    logic        w;
    op = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
    imm = {{16{ins[15]}}, ins[15:0]};
    a = s.regs[rs]; b = s.regs[rt];
    npc = s.pc + 4;
    w = 0; wd = 0; wv = 0;
    if (op == 0) begin
      if (ins[5:0] >= 1 && ins[5:0] <= 10) begin w = 1; wd = rd; wv = arith(ins[5:0], a, b); end
    end else if (op >= 1 && op <= 10) begin
      w = 1; wd = rt; wv = arith(op, a, imm);
    end else begin
      case (op)
        OP_LW:  begin w = 1; wd = rt; wv = s.dmem[10'((a + imm) >> 2)]; end
        OP_SW:  s.dmem[10'((a + imm) >> 2)] = b;
        OP_BEQ: if (a == imm) npc = b;
        OP_BNE: if (a != imm) npc = b;
        OP_BGT: if ($signed(a) > $signed(imm)) npc = b;
        OP_BLT: if ($signed(a) < $signed(imm)) npc = b;
        OP_SLL: begin w = 1; wd = rt; wv = a << imm[4:0]; end
        OP_SRL: begin w = 1; wd = rt; wv = a >> imm[4:0]; end
        OP_J:   npc = {npc[31:28], ins[25:0], 2'b00};
        OP_JAL: begin
          logic [31:0] ra;
          ra = s.regs[31] + 4;
          s.dmem[10'(ra >> 2)] = npc;
          w = 1; wd = 5'd31; wv = ra;
          npc = {npc[31:28], ins[25:0], 2'b00};
        end
        OP_JR: begin
          w = 1; wd = rs; wv = a - 4;
          npc = s.dmem[10'(a >> 2)];
        end
        default: ;
      endcase
    end
    if (w && wd != 0) s.regs[wd] = wv;
    s.pc = npc;
    return w && wd != 0;
  endfunction

  // ---------------------------------------------------------------- programs
  // fib_program: the Fibonacci test; results 1 2 3 5 8 13 21 34 55.
  // directed_program: multiply/divide, loads and stores, every branch kind,
  //   jumps and nested calls through the JAL/JR stack; ends at word 47.
  // random_program: n random arithmetic, shift, load and store instructions
  //   over registers 0-7 and data words 0-7 (initialised first).
  // table_examples_program: the operand values of the instruction-set
  //   examples (immediate 100, BEQ against 25, shift by 3, J 2500, JAL 2591,
  //   JR $ra) at their real addresses.
  // Each ends with a jump to itself.
  function automatic void fib_program(ref logic [31:0] prog [$]);
    prog.delete();
    prog.push_back(32'd1);
    prog.push_back(r_type(FN_ADD, 1, 0, 3));
    prog.push_back(r_type(FN_ADD, 3, 1, 4));
    prog.push_back(r_type(FN_ADD, 3, 4, 5));
    prog.push_back(r_type(FN_ADD, 5, 4, 6));
    prog.push_back(r_type(FN_ADD, 5, 6, 7));
    prog.push_back(r_type(FN_ADD, 6, 7, 5));
    prog.push_back(r_type(FN_ADD, 5, 7, 1));
    prog.push_back(r_type(FN_ADD, 1, 5, 4));
    prog.push_back(r_type(FN_ADD, 1, 4, 5));
    prog.push_back(j_type(OP_J, 10));
  endfunction

  function automatic void directed_program(ref logic [31:0] prog [$]);
    prog.delete();
    // 0: multiplication from the waveform: 5000 * -5
    prog.push_back(i_type(OP_ADDI, 0, 8, 5000));      // r8 = 5000
    prog.push_back(i_type(OP_ADDI, 0, 9, -5));        // r9 = -5
    prog.push_back(r_type(FN_MUL, 8, 9, 10));         // r10 = -25000
    prog.push_back(r_type(FN_ADD, 10, 10, 11));       // uses MUL result at once
    prog.push_back(i_type(OP_MULI, 10, 12, -3));      // r12 = 75000
    prog.push_back(r_type(FN_DIV, 12, 9, 13));        // r13 = -15000
    prog.push_back(i_type(OP_DIVI, 13, 14, 7));       // r14 = -2142
    prog.push_back(r_type(FN_SLT, 14, 13, 15));       // 0
    prog.push_back(i_type(OP_SLTI, 14, 16, 0));       // 1
    // 9: memory, load-use
    prog.push_back(i_type(OP_SW, 0, 10, 64));         // mem[16] = -25000
    prog.push_back(i_type(OP_SW, 0, 12, 68));
    prog.push_back(i_type(OP_LW, 0, 17, 64));
    prog.push_back(r_type(FN_SUB, 17, 8, 18));        // load-use
    prog.push_back(i_type(OP_LW, 0, 19, 68));
    prog.push_back(i_type(OP_ANDI, 19, 20, 16'h0FF0)); // load-use on rs
    prog.push_back(i_type(OP_ORI, 20, 21, 5));
    prog.push_back(i_type(OP_XORI, 21, 22, -1));
    prog.push_back(i_type(OP_NORI, 22, 23, 3));
    prog.push_back(i_type(OP_NANDI, 23, 24, 7));
    prog.push_back(i_type(OP_SUBI, 24, 25, 100));
    prog.push_back(i_type(OP_SLL, 8, 26, 3));          // 40000
    prog.push_back(i_type(OP_SRL, 9, 27, 28));         // 0xF
    // 22: branches; target register r2 = address of word 26 (104)
    prog.push_back(i_type(OP_ADDI, 0, 2, 104));
    prog.push_back(i_type(OP_BEQ, 8, 2, 5000));        // taken -> 26
    prog.push_back(i_type(OP_ADDI, 0, 3, 999));        // skipped
    prog.push_back(i_type(OP_ADDI, 0, 3, 998));        // skipped
    prog.push_back(i_type(OP_ADDI, 0, 2, 124));        // 26: r2 = 124 (word 31)
    prog.push_back(i_type(OP_BNE, 8, 2, 5000));        // not taken
    prog.push_back(i_type(OP_BGT, 9, 2, 0));           // not taken
    prog.push_back(i_type(OP_BLT, 9, 2, 0));           // taken -> 31
    prog.push_back(i_type(OP_ADDI, 0, 3, 997));        // skipped
    prog.push_back(i_type(OP_ADDI, 0, 2, 140));        // 31: r2 = 140 (word 35)
    prog.push_back(i_type(OP_BGT, 8, 2, 100));         // taken -> 35
    prog.push_back(i_type(OP_ADDI, 0, 3, 996));
    prog.push_back(i_type(OP_ADDI, 0, 3, 995));
    // 35: stack pointer in r31, call subroutine at 50 which calls 60
    prog.push_back(i_type(OP_ADDI, 0, 31, 256));
    prog.push_back(j_type(OP_JAL, 50));                // 36
    prog.push_back(i_type(OP_ADDI, 0, 4, 44));         // 37: after return
    prog.push_back(j_type(OP_J, 45));                  // 38
    prog.push_back(i_type(OP_ADDI, 0, 3, 994));        // 39: skipped
    for (int i = 40; i < 45; i++) prog.push_back(i_type(OP_ADDI, 0, 3, 900 + i));
    prog.push_back(i_type(OP_ADDI, 4, 5, 1));          // 45
    prog.push_back(r_type(FN_MUL, 5, 5, 6));           // 46
    prog.push_back(j_type(OP_J, 47));                  // 47: end
    for (int i = 48; i < 50; i++) prog.push_back(32'd0);
    prog.push_back(i_type(OP_ADDI, 0, 7, 77));         // 50: sub A
    prog.push_back(j_type(OP_JAL, 60));                // 51
    prog.push_back(i_type(OP_ADDI, 7, 7, 1));          // 52
    prog.push_back({OP_JR, 5'd31, 21'd0});             // 53: return
    prog.push_back(i_type(OP_ADDI, 0, 3, 993));        // 54: skipped
    for (int i = 55; i < 60; i++) prog.push_back(32'd0);
    prog.push_back(i_type(OP_MULI, 7, 7, 3));          // 60: sub B
    prog.push_back({OP_JR, 5'd31, 21'd0});             // 61
    prog.push_back(i_type(OP_ADDI, 0, 3, 992));        // 62: skipped
  endfunction

  function automatic void random_program(ref logic [31:0] prog [$], input int n);
    prog.delete();
    // initialise the data words used
    for (int k = 0; k < 8; k++) prog.push_back(i_type(OP_SW, 0, k, 4 * k));
    for (int i = 0; i < n; i++) begin
      int kind, rs, rt, rd;
      rs = $urandom_range(0, 7); rt = $urandom_range(0, 7); rd = $urandom_range(0, 7);
      kind = $urandom_range(0, 9);
      case (kind)
        0, 1, 2: prog.push_back(r_type(funct_e'($urandom_range(1, 10)), rs, rt, rd));
        3, 4:    prog.push_back(i_type(opcode_e'($urandom_range(1, 10)), rs, rt,
                                       ($urandom_range(0, 1)) ? $urandom_range(0, 65535)
                                                              : $urandom_range(0, 20)));
        5:       prog.push_back(i_type(($urandom_range(0, 1)) ? OP_SLL : OP_SRL, rs, rt,
                                       $urandom_range(0, 31)));
        6, 7:    prog.push_back(i_type(OP_LW, 0, rt, 4 * $urandom_range(0, 7)));
        default: prog.push_back(i_type(OP_SW, 0, rt, 4 * $urandom_range(0, 7)));
      endcase
    end
    prog.push_back(j_type(OP_J, prog.size()));
  endfunction


  function automatic void table_examples_program(ref logic [31:0] prog [$]);
    prog.delete();
    prog.push_back(i_type(OP_ADDI, 1, 2, 100));   // r2 = r1 + 100 = 101
    prog.push_back(i_type(OP_SUBI, 2, 3, 100));   // r3 = 1
    prog.push_back(i_type(OP_MULI, 2, 4, 100));   // r4 = 10100
    prog.push_back(i_type(OP_DIVI, 4, 5, 100));   // r5 = 101
    prog.push_back(i_type(OP_SLL, 5, 6, 3));      // r6 = 808
    prog.push_back(i_type(OP_SRL, 6, 7, 3));      // r7 = 101
    prog.push_back(i_type(OP_ADDI, 0, 8, 25));    // r8 = 25
    prog.push_back(i_type(OP_ADDI, 0, 9, 44));    // r9 = byte address of word 11
    prog.push_back(i_type(OP_BEQ, 8, 9, 25));     // r8 == 25: go to r9
    prog.push_back(i_type(OP_ADDI, 0, 3, 990));   // skipped
    prog.push_back(i_type(OP_ADDI, 0, 3, 991));   // skipped
    prog.push_back(j_type(OP_J, 2500));           // 11
    while (prog.size() < 2500) prog.push_back(32'd0);
    prog.push_back(j_type(OP_JAL, 2591));         // 2500
    prog.push_back(i_type(OP_ADDI, 0, 10, 1));    // 2501: after the return
    prog.push_back(j_type(OP_J, 2502));           // 2502: end
    while (prog.size() < 2591) prog.push_back(32'd0);
    prog.push_back(i_type(OP_ADDI, 0, 11, 7));    // 2591: subroutine
    prog.push_back({OP_JR, 5'd31, 21'd0});        // JR $ra
    prog.push_back(i_type(OP_ADDI, 0, 3, 992));   // skipped
  endfunction

endpackage

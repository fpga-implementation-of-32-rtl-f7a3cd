// tb_control_unit -- self-checking test of the instruction decoder.
// Every opcode of the instruction set, every R-type function value and
// unknown codes are decoded and the control word is compared with the
// expected fields worked out per instruction below.
module tb_control_unit;
  import mips_pkg::*;
  import tb_asm_pkg::*;

  logic [31:0] instr, imm_sext;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  task automatic expect_bits(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b exp %b (instr %h)", what, got, exp, instr); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fibonacci word from the reference program: ADD Reg1, Reg0 -> Reg3
    instr = 32'd2103297; #1;
    expect_bits("fib valid", ctrl.valid, 1);
    checks++; if (ctrl.dest !== 5'd3 || ctrl.alu_op !== ALU_ADD || ctrl.b_sel !== B_REG) failures++;

    // R-type function values
    begin
      alu_op_e exp_op [11] = '{ALU_ADD, ALU_ADD, ALU_SUB, ALU_ADD, ALU_AND, ALU_OR,
                               ALU_NOR, ALU_NAND, ALU_XOR, ALU_ADD, ALU_SLT};
      for (int f = 1; f <= 10; f++) begin
        instr = r_type(funct_e'(f), 4, 5, 6); #1;
        expect_bits("r valid", ctrl.valid, 1);
        expect_bits("r we", ctrl.reg_write, 1);
        checks++; if (ctrl.dest !== 5'd6 || ctrl.b_sel !== B_REG || !ctrl.uses_rt) failures++;
        checks++;
        if (f == 3)      begin if (ctrl.md_op !== MD_MUL) failures++; end
        else if (f == 9) begin if (ctrl.md_op !== MD_DIV) failures++; end
        else if (ctrl.alu_op !== exp_op[f] || ctrl.md_op !== MD_NONE) failures++;
        // the I-type twin
        instr = i_type(opcode_e'(f), 4, 7, -100); #1;
        checks++;
        if (!ctrl.valid || ctrl.dest !== 5'd7 || ctrl.b_sel !== B_IMM || ctrl.uses_rt ||
            imm_sext !== -32'sd100) failures++;
        checks++;
        if (f == 3)      begin if (ctrl.md_op !== MD_MUL) failures++; end
        else if (f == 9) begin if (ctrl.md_op !== MD_DIV) failures++; end
        else if (ctrl.alu_op !== exp_op[f]) failures++;
      end
    end
    instr = r_type(funct_e'(6'd11), 1, 2, 3); #1;
    expect_bits("unknown funct", ctrl.valid, 0);
    expect_bits("unknown funct we", ctrl.reg_write, 0);
    instr = {6'd40, 26'h123}; #1;
    expect_bits("unknown op", ctrl.valid, 0);

    instr = i_type(OP_LW, 2, 9, 8); #1;
    checks++; if (!ctrl.mem_read || !ctrl.reg_write || ctrl.dest !== 9 || ctrl.mem_write) failures++;
    instr = i_type(OP_SW, 2, 9, 8); #1;
    checks++; if (!ctrl.mem_write || ctrl.reg_write || !ctrl.uses_rt) failures++;
    instr = i_type(OP_BEQ, 1, 2, 25); #1;
    checks++; if (ctrl.branch !== BR_EQ || ctrl.reg_write || ctrl.alu_op !== ALU_SUB) failures++;
    instr = i_type(OP_BNE, 1, 2, 25); #1; checks++; if (ctrl.branch !== BR_NE) failures++;
    instr = i_type(OP_BGT, 1, 2, 25); #1; checks++; if (ctrl.branch !== BR_GT) failures++;
    instr = i_type(OP_BLT, 1, 2, 25); #1; checks++; if (ctrl.branch !== BR_LT) failures++;
    instr = i_type(OP_SLL, 1, 2, 3); #1;
    checks++; if (ctrl.alu_op !== ALU_SLL || ctrl.dest !== 2 || !ctrl.reg_write) failures++;
    instr = i_type(OP_SRL, 1, 2, 3); #1;
    checks++; if (ctrl.alu_op !== ALU_SRL) failures++;
    instr = j_type(OP_J, 2500); #1;
    checks++; if (!ctrl.jump || ctrl.reg_write || ctrl.mem_write || ctrl.link) failures++;
    instr = j_type(OP_JAL, 2591); #1;
    checks++;
    if (!ctrl.jump || !ctrl.link || !ctrl.mem_write || ctrl.dest !== 5'd31 ||
        ctrl.b_sel !== B_FOUR || ctrl.alu_op !== ALU_ADD) failures++;
    instr = {OP_JR, 5'd31, 21'd0}; #1;
    checks++;
    if (!ctrl.jr || !ctrl.mem_read || !ctrl.addr_rs || ctrl.dest !== 5'd31 ||
        ctrl.alu_op !== ALU_SUB || ctrl.b_sel !== B_FOUR) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

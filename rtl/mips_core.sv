// mips_core -- 32-bit five-stage pipelined MIPS-style processor with a
// multi-cycle multiply ("CISC") operation.
//
// Stages: IF fetches the word at the PC from the instruction memory; ID
// decodes it, reads the register file and resolves J/JAL; EX runs ALU 1 or
// the dedicated ALU 2 (Booth multiplier / divider), decides conditional
// branches and computes memory addresses; MEM accesses the data memory and
// resolves JR from the return-address stack; WB writes the register file.
// This stage split, the two ALUs, the 4-cycle multiply and forwarding into EX
// from the later stages follow the published design. The rest is this
// design's own choice:
//   * Forwarding into EX from EX/MEM and from MEM/WB; the register file also
//     passes a value being written straight to a read in the same cycle.
//   * A load followed at once by a user of its result holds decode for one
//     cycle (one bubble).
//   * MUL/MULI keeps the instruction in EX for 4 extra cycles, DIV/DIVI for
//     33 extra cycles; fetch and decode are held, MEM and WB drain.
//   * A taken branch redirects fetch from EX and cancels the two younger
//     instructions; J/JAL redirect from ID and cancel one; JR redirects from
//     MEM and cancels three. There are no delay slots.
//   * Branch: if rs compares true with the sign-extended immediate, the PC
//     becomes the value of the register in [20:16]. J/JAL target:
//     {PC+4[31:28], field[25:0], 2'b00}. JAL: $ra <- $ra + 4 and the return
//     address (PC of the JAL + 4) is stored at the new $ra. JR: PC <- MEM[rs]
//     and rs <- rs - 4.
//
// The program is loaded through the instruction-memory write port (imem_*)
// while rst is high; the PC restarts at 0 when rst falls. Every register
// write to a register other than 0 is presented on out_we/out_data in its
// write-back cycle. aluout, dataout and signvalue show the EX result, the
// instruction in ID and the immediate of the instruction in EX.
module mips_core
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS      = 4096,
  parameter int unsigned DMEM_WORDS      = 1024,
  parameter int unsigned STEPS_PER_CYCLE = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  output logic                          out_we,
  output logic [31:0]                   out_data,
  output logic [4:0]                    out_dest,
  output logic [31:0]                   pc,
  output logic [31:0]                   aluout,
  output logic [31:0]                   dataout,
  output logic [31:0]                   signvalue,
  output logic [63:0]                   mul_buffer,
  output events_t                       events
);

  // ---------------------------------------------------------------- IF
  logic [31:0] if_instr, pc_plus4;

  instruction_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .pc    (pc),
    .instr (if_instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  assign pc_plus4 = pc + 32'd4;

  // IF/ID
  logic        ifid_valid;
  logic [31:0] ifid_instr, ifid_pc4;

  // ---------------------------------------------------------------- ID
  ctrl_t       id_ctrl_raw, id_ctrl;
  logic [31:0] id_imm, id_rs_val, id_rt_val, id_jtarget;
  logic [4:0]  id_rs, id_rt;

  control_unit u_ctrl (
    .instr    (ifid_instr),
    .ctrl     (id_ctrl_raw),
    .imm_sext (id_imm)
  );

  assign id_ctrl    = ifid_valid ? id_ctrl_raw : CTRL_NOP;
  assign id_rs      = id_ctrl_raw.link ? 5'(RA_REG) : ifid_instr[25:21];
  assign id_rt      = ifid_instr[20:16];
  assign id_jtarget = {ifid_pc4[31:28], ifid_instr[25:0], 2'b00};

  // write-back signals (declared ahead for the register file)
  logic        wb_we;
  logic [4:0]  wb_dest;
  logic [31:0] wb_value;

  register_file #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk    (clk),
    .rst    (rst),
    .raddr1 (id_rs),
    .rdata1 (id_rs_val),
    .raddr2 (id_rt),
    .rdata2 (id_rt_val),
    .we     (wb_we),
    .waddr  (wb_dest),
    .wdata  (wb_value)
  );

  // ID/EX
  ctrl_t       idex_ctrl;
  logic [4:0]  idex_rs, idex_rt;
  logic [31:0] idex_rs_val, idex_rt_val, idex_imm, idex_pc4;

  // ---------------------------------------------------------------- EX
  // EX/MEM
  ctrl_t       exmem_ctrl;
  logic [31:0] exmem_result, exmem_addr, exmem_wdata;
  // MEM/WB
  ctrl_t       memwb_ctrl;
  logic [31:0] memwb_value;

  logic [1:0]  fwd_a, fwd_b;
  logic [31:0] ex_a, ex_rt_fwd, ex_b, ex_alu_y, ex_md_y, ex_result;
  logic        ex_zero, ex_taken, md_stall, mul_start, div_start;

  forward_unit u_fwd (
    .ex_rs         (idex_rs),
    .ex_rt         (idex_rt),
    .mem_reg_write (exmem_ctrl.reg_write),
    .mem_dest      (exmem_ctrl.dest),
    .wb_reg_write  (memwb_ctrl.reg_write),
    .wb_dest       (memwb_ctrl.dest),
    .fwd_a         (fwd_a),
    .fwd_b         (fwd_b)
  );

  always_comb begin
    unique case (fwd_a)
      2'd1:    ex_a = exmem_result;
      2'd2:    ex_a = memwb_value;
      default: ex_a = idex_rs_val;
    endcase
    unique case (fwd_b)
      2'd1:    ex_rt_fwd = exmem_result;
      2'd2:    ex_rt_fwd = memwb_value;
      default: ex_rt_fwd = idex_rt_val;
    endcase
    unique case (idex_ctrl.b_sel)
      B_IMM:   ex_b = idex_imm;
      B_FOUR:  ex_b = 32'd4;
      default: ex_b = ex_rt_fwd;
    endcase
  end

  alu u_alu1 (
    .op   (idex_ctrl.alu_op),
    .a    (ex_a),
    .b    (ex_b),
    .y    (ex_alu_y),
    .zero (ex_zero)
  );

  logic mem_jr;  // JR resolving in MEM cancels the instruction in EX

  muldiv_unit #(.STEPS_PER_CYCLE(STEPS_PER_CYCLE)) u_alu2 (
    .clk       (clk),
    .rst       (rst),
    .flush     (mem_jr),
    .op        (idex_ctrl.md_op),
    .a         (ex_a),
    .b         (ex_b),
    .stall     (md_stall),
    .result    (ex_md_y),
    .buffer    (mul_buffer),
    .mul_start (mul_start),
    .div_start (div_start)
  );

  assign ex_result = (idex_ctrl.md_op != MD_NONE) ? ex_md_y : ex_alu_y;

  // Branch: compare rs with the immediate (ALU 1 subtracts; zero flag = equal).
  always_comb begin
    unique case (idex_ctrl.branch)
      BR_EQ:   ex_taken = ex_zero;
      BR_NE:   ex_taken = !ex_zero;
      BR_GT:   ex_taken = ($signed(ex_a) > $signed(idex_imm));
      BR_LT:   ex_taken = ($signed(ex_a) < $signed(idex_imm));
      default: ex_taken = 1'b0;
    endcase
  end

  // ---------------------------------------------------------------- MEM
  logic [31:0] mem_rdata;

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk   (clk),
    .addr  (exmem_addr),
    .we    (exmem_ctrl.mem_write),
    .wdata (exmem_wdata),
    .rdata (mem_rdata)
  );

  assign mem_jr = exmem_ctrl.jr;

  // ---------------------------------------------------------------- hazards
  logic load_use, hold_id, id_jump;

  assign load_use = idex_ctrl.mem_read && !idex_ctrl.jr && idex_ctrl.reg_write &&
                    idex_ctrl.dest != 5'd0 &&
                    ((id_ctrl.uses_rs && id_rs == idex_ctrl.dest) ||
                     (id_ctrl.uses_rt && id_rt == idex_ctrl.dest));
  assign hold_id  = md_stall || load_use;
  assign id_jump  = id_ctrl.jump;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc          <= '0;
      ifid_valid  <= 1'b0;
      ifid_instr  <= '0;
      ifid_pc4    <= '0;
      idex_ctrl   <= CTRL_NOP;
      idex_rs     <= '0;
      idex_rt     <= '0;
      idex_rs_val <= '0;
      idex_rt_val <= '0;
      idex_imm    <= '0;
      idex_pc4    <= '0;
      exmem_ctrl  <= CTRL_NOP;
      exmem_result <= '0;
      exmem_addr  <= '0;
      exmem_wdata <= '0;
      memwb_ctrl  <= CTRL_NOP;
      memwb_value <= '0;
    end else begin
      // PC
      if (mem_jr)        pc <= mem_rdata;
      else if (ex_taken) pc <= ex_rt_fwd;
      else if (hold_id)  pc <= pc;
      else if (id_jump)  pc <= id_jtarget;
      else               pc <= pc_plus4;

      // IF/ID
      if (mem_jr || ex_taken || (!hold_id && id_jump)) begin
        ifid_valid <= 1'b0;
      end else if (!hold_id) begin
        ifid_valid <= 1'b1;
        ifid_instr <= if_instr;
        ifid_pc4   <= pc_plus4;
      end

      // ID/EX
      if (mem_jr || ex_taken || (load_use && !md_stall)) begin
        idex_ctrl <= CTRL_NOP;
      end else if (!md_stall) begin
        idex_ctrl   <= id_ctrl;
        idex_rs     <= id_rs;
        idex_rt     <= id_rt;
        idex_rs_val <= id_rs_val;
        idex_rt_val <= id_rt_val;
        idex_imm    <= id_imm;
        idex_pc4    <= ifid_pc4;
      end

      // EX/MEM
      if (mem_jr || md_stall) begin
        exmem_ctrl <= CTRL_NOP;
      end else begin
        exmem_ctrl   <= idex_ctrl;
        exmem_result <= ex_result;
        exmem_addr   <= idex_ctrl.addr_rs ? ex_a : ex_alu_y;
        exmem_wdata  <= idex_ctrl.link ? idex_pc4 : ex_rt_fwd;
      end

      // MEM/WB
      memwb_ctrl  <= exmem_ctrl;
      memwb_value <= (exmem_ctrl.mem_read && !exmem_ctrl.jr) ? mem_rdata : exmem_result;
    end
  end

  // ---------------------------------------------------------------- WB
  assign wb_we    = memwb_ctrl.reg_write;
  assign wb_dest  = memwb_ctrl.dest;
  assign wb_value = memwb_value;

  assign out_we   = memwb_ctrl.reg_write && memwb_ctrl.dest != 5'd0;
  assign out_data = memwb_value;
  assign out_dest = memwb_ctrl.dest;

  // ---------------------------------------------------------------- observation
  assign aluout    = ex_result;
  assign dataout   = ifid_instr;
  assign signvalue = idex_imm;

  always_comb begin
    events = '0;
    events.fwd_exmem      = !md_stall && ((fwd_a == 2'd1 && idex_ctrl.uses_rs) ||
                                          (fwd_b == 2'd1 && idex_ctrl.uses_rt));
    events.fwd_memwb      = !md_stall && ((fwd_a == 2'd2 && idex_ctrl.uses_rs) ||
                                          (fwd_b == 2'd2 && idex_ctrl.uses_rt));
    events.load_use_stall = load_use && !md_stall && !mem_jr && !ex_taken;
    events.md_stall       = md_stall && !mem_jr;
    events.mul_start      = mul_start;
    events.div_start      = div_start;
    events.branch_taken   = ex_taken && !mem_jr;
    events.jump           = id_jump && !hold_id && !mem_jr && !ex_taken;
    events.jr_return      = mem_jr;
    events.retire         = memwb_ctrl.valid;
  end

endmodule

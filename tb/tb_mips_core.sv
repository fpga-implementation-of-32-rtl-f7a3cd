// tb_mips_core -- self-checking test of the pipelined processor.
//
// Each program is loaded through the instruction-memory port during reset.
// The processor's register-write stream (destination and value, in order) is
// compared with the reference instruction-set model of tb_asm_pkg run on the
// same program; a program ends in a "J to itself" loop. Programs:
//   1. the Fibonacci test (writes 0+1=1, 2, 3, ... 55 with back-to-back
//      dependences handled by forwarding),
//   2. a directed program with 5000 * -5, MULI, DIV/DIVI, loads followed at
//      once by their use, stores, taken and untaken branches of every kind,
//      shifts, J, nested JAL/JR through the stack,
//   3. the operand values of the instruction-set examples at their real
//      addresses (J 2500, JAL 2591, JR, BEQ against 25, shift by 3),
//   4. random straight-line programs over a few registers mixing every
//      arithmetic, shift, load and store instruction.
// Also checked: a multiplication holds the pipeline exactly 4 cycles and a
// division 33; every mechanism (both forwarding paths, load-use stall,
// multiply/divide stall, taken branch, jump, return) happens at least once.
module tb_mips_core;
  import mips_pkg::*;
  import tb_asm_pkg::*;

  logic        clk = 0, rst;
  logic        imem_we;
  logic [11:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic        out_we;
  logic [31:0] out_data, pc, aluout, dataout, signvalue;
  logic [4:0]  out_dest;
  logic [63:0] mul_buffer;
  events_t     events;

  int checks = 0, failures = 0;
  int n_fwd_exmem = 0, n_fwd_memwb = 0, n_lu = 0, n_md = 0, n_mul = 0, n_div = 0;
  int n_br = 0, n_j = 0, n_jr = 0;

  mips_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event counters and stall-length measurement.
  int md_run = 0;
  md_op_e md_kind;
  always @(posedge clk) if (!rst) begin
    n_fwd_exmem += int'(events.fwd_exmem);
    n_fwd_memwb += int'(events.fwd_memwb);
    n_lu  += int'(events.load_use_stall);
    n_md  += int'(events.md_stall);
    n_mul += int'(events.mul_start);
    n_div += int'(events.div_start);
    n_br  += int'(events.branch_taken);
    n_j   += int'(events.jump);
    n_jr  += int'(events.jr_return);
    if (events.md_stall) begin
      if (md_run == 0) md_kind = dut.idex_ctrl.md_op;
      md_run++;
    end else if (md_run != 0) begin
      checks++;
      if (md_run != ((md_kind == MD_MUL) ? 4 : 33)) begin
        failures++;
        $display("FAIL stall of %0d cycles for op %0d", md_run, md_kind);
      end
      md_run = 0;
    end
  end

  logic [31:0] prog [$];
  logic [31:0] seen [$];   // values written by the last program, in order

  task automatic run_program(string name, int max_cycles);
    arch_t s;
    logic [4:0]  ed [$];
    logic [31:0] ev [$];
    logic [4:0]  wd;
    logic [31:0] wv;
    int got, steps, cyc;
    // reference run
    s.pc = 0;
    for (int i = 0; i < 32; i++) s.regs[i] = i;
    for (int i = 0; i < DMEM_WORDS; i++) s.dmem[i] = 0;
    steps = 0;
    while (1) begin
      logic [31:0] ins;
      ins = prog[s.pc >> 2];
      if (ins == j_type(OP_J, s.pc >> 2)) break;
      if (iss_step(s, ins, wd, wv)) begin ed.push_back(wd); ev.push_back(wv); end
      steps++;
      if (steps > 100000) begin $display("reference model runaway in %s", name); break; end
    end
    // load and run the pipeline
    rst = 1; imem_we = 0;
    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    rst = 0;
    got = 0; cyc = 0; seen.delete();
    while (cyc < max_cycles) begin
      @(posedge clk); #1;
      cyc++;
      if (out_we) begin
        seen.push_back(out_data);
        checks++;
        if (got >= ed.size()) begin
          failures++; $display("FAIL %s: extra write r%0d=%h", name, out_dest, out_data);
        end else if (out_dest !== ed[got] || out_data !== ev[got]) begin
          failures++;
          $display("FAIL %s: write %0d r%0d=%h exp r%0d=%h", name, got, out_dest, out_data, ed[got], ev[got]);
        end
        got++;
      end
    end
    checks++;
    if (got != ed.size()) begin
      failures++; $display("FAIL %s: %0d writes, expected %0d", name, got, ed.size());
    end
    $display("%s: %0d instructions, %0d register writes", name, steps, got);
  endtask

  initial begin
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;

    fib_program(prog);
    run_program("fibonacci", 40);
    begin
      // the results, in order, are 1 2 3 5 8 13 21 34 55 (the write of r0 is not shown)
      logic [31:0] fib [9] = '{1, 2, 3, 5, 8, 13, 21, 34, 55};
      checks++;
      if (seen.size() != 9) failures++;
      else foreach (fib[i]) if (seen[i] !== fib[i]) failures++;
    end

    directed_program(prog);
    run_program("directed", 400);
    checks++;
    if (mul_buffer !== 64'(45 * 45)) begin
      failures++; $display("FAIL mul buffer %h", mul_buffer);
    end

    // writes: 101 1 10100 101 808 101 25 44, JAL: $ra 31 -> 35, 7, JR: $ra -> 31, 1
    table_examples_program(prog);
    run_program("table examples", 80);
    checks++;
    if (seen.size() != 12 || seen[2] !== 32'd10100 || seen[4] !== 32'd808 ||
        seen[8] !== 32'd35 || seen[9] !== 32'd7 || seen[10] !== 32'd31 || seen[11] !== 32'd1) begin
      failures++; $display("FAIL table examples: %p", seen);
    end

    for (int r = 0; r < 12; r++) begin
      random_program(prog, 150);
      run_program($sformatf("random%0d", r), 2500);
    end

    $display("events: fwd_exmem=%0d fwd_memwb=%0d load_use=%0d md_stall=%0d mul=%0d div=%0d branch=%0d jump=%0d jr=%0d",
             n_fwd_exmem, n_fwd_memwb, n_lu, n_md, n_mul, n_div, n_br, n_j, n_jr);
    checks++; if (n_fwd_exmem == 0) failures++;
    checks++; if (n_fwd_memwb == 0) failures++;
    checks++; if (n_lu == 0) failures++;
    checks++; if (n_md == 0) failures++;
    checks++; if (n_mul == 0) failures++;
    checks++; if (n_div == 0) failures++;
    checks++; if (n_br == 0) failures++;
    checks++; if (n_j == 0) failures++;
    checks++; if (n_jr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpga_top -- end-to-end test of the board-level design at its default
// sizes (4096-word instruction memory, 1024-word data memory, 512-word
// result RAM).
//
// Runs the Fibonacci test, the directed program (multiply 5000 * -5, divide,
// loads/stores, branches, jumps, nested calls) and one random program. For
// each: the processor's register-write stream must match the reference
// instruction-set model, every written value must land in the result RAM at
// consecutive addresses, and the values read back on the independent external
// clock (doutb) must equal what was written there. For the Fibonacci test the
// read-back sequence must be 1 2 3 5 8 13 21 34 55. Each mechanism of the
// design is counted and must occur: forwarding from EX/MEM and from MEM/WB,
// load-use stall, multiply stall (4 cycles each), divide stall, taken branch,
// jump, return through the stack, result-RAM write and read.
module tb_fpga_top;
  import mips_pkg::*;
  import tb_asm_pkg::*;

  logic        clk = 0, reset, ext_clk = 0;
  logic        imem_we;
  logic [11:0] imem_waddr;
  logic [31:0] imem_wdata, doutb, pc, aluout, dataout, signvalue, out_data;
  logic [63:0] mul_buffer;
  logic        out_we;
  logic [8:0]  out_count;
  events_t     events;

  int checks = 0, failures = 0;
  int n_fwd_exmem = 0, n_fwd_memwb = 0, n_lu = 0, n_md = 0, n_mul = 0, n_div = 0;
  int n_br = 0, n_j = 0, n_jr = 0, n_ram_w = 0, n_ram_r = 0;

  fpga_top dut (.*);

  always #5 clk = ~clk;
  always #13 ext_clk = ~ext_clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int md_run = 0;
  md_op_e md_kind;
  always @(posedge clk) if (!reset) begin
    n_fwd_exmem += int'(events.fwd_exmem);
    n_fwd_memwb += int'(events.fwd_memwb);
    n_lu  += int'(events.load_use_stall);
    n_md  += int'(events.md_stall);
    n_mul += int'(events.mul_start);
    n_div += int'(events.div_start);
    n_br  += int'(events.branch_taken);
    n_j   += int'(events.jump);
    n_jr  += int'(events.jr_return);
    n_ram_w += int'(out_we);
    if (events.md_stall) begin
      if (md_run == 0) md_kind = dut.u_core.idex_ctrl.md_op;
      md_run++;
    end else if (md_run != 0) begin
      checks++;
      if (md_run != ((md_kind == MD_MUL) ? 4 : 33)) begin
        failures++; $display("FAIL stall of %0d cycles", md_run);
      end
      md_run = 0;
    end
  end

  logic [31:0] prog [$];
  logic [31:0] seen [$];
  logic [31:0] readback [$];

  task automatic run_program(string name, int max_cycles);
    arch_t s;
    logic [4:0]  ed [$];
    logic [31:0] ev [$];
    logic [4:0]  wd;
    logic [31:0] wv;
    int got, cyc, steps;
    s.pc = 0;
    for (int i = 0; i < 32; i++) s.regs[i] = i;
    for (int i = 0; i < DMEM_WORDS; i++) s.dmem[i] = 0;
    steps = 0;
    while (steps < 100000) begin
      logic [31:0] ins;
      ins = prog[s.pc >> 2];
      if (ins == j_type(OP_J, s.pc >> 2)) break;
      if (iss_step(s, ins, wd, wv)) begin ed.push_back(wd); ev.push_back(wv); end
      steps++;
    end
    reset = 1; imem_we = 0;
    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    reset = 0;
    got = 0; cyc = 0; seen.delete();
    while (cyc < max_cycles) begin
      @(posedge clk); #1;
      cyc++;
      if (out_we) begin
        seen.push_back(out_data);
        checks++;
        if (got >= ed.size() || out_data !== ev[got]) begin
          failures++; $display("FAIL %s: write %0d = %h", name, got, out_data);
        end
        got++;
      end
    end
    checks++;
    if (got != ed.size() || out_count != 9'(got)) begin
      failures++; $display("FAIL %s: %0d writes, counter %0d, expected %0d", name, got, out_count, ed.size());
    end
    // Read the result RAM back on the external clock: one word per edge.
    readback.delete();
    for (int k = 0; k < 600 && readback.size() < seen.size(); k++) begin
      logic [8:0] a;
      @(negedge ext_clk);
      a = dut.rd_addr;
      @(posedge ext_clk); #1;
      if (int'(a) == readback.size()) begin
        readback.push_back(doutb);
        n_ram_r++;
      end
    end
    checks++;
    if (readback.size() != seen.size()) begin
      failures++; $display("FAIL %s: read back %0d of %0d", name, readback.size(), seen.size());
    end
    foreach (readback[i]) begin
      checks++;
      if (readback[i] !== seen[i]) begin
        failures++; $display("FAIL %s: RAM[%0d] = %h, expected %h", name, i, readback[i], seen[i]);
      end
    end
    $display("%s: %0d instructions, %0d results stored and read back", name, steps, readback.size());
  endtask

  initial begin
    reset = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;

    fib_program(prog);
    run_program("fibonacci", 40);
    begin
      logic [31:0] fib [9] = '{1, 2, 3, 5, 8, 13, 21, 34, 55};
      checks++;
      if (readback.size() != 9) failures++;
      else foreach (fib[i]) if (readback[i] !== fib[i]) failures++;
    end

    directed_program(prog);
    run_program("directed", 400);
    checks++;
    if (seen.size() < 3 || seen[2] !== -32'sd25000) begin
      failures++; $display("FAIL 5000 * -5");
    end

    random_program(prog, 200);
    run_program("random", 2000);

    $display("events: fwd_exmem=%0d fwd_memwb=%0d load_use=%0d md_stall=%0d mul=%0d div=%0d branch=%0d jump=%0d jr=%0d ram_w=%0d ram_r=%0d",
             n_fwd_exmem, n_fwd_memwb, n_lu, n_md, n_mul, n_div, n_br, n_j, n_jr, n_ram_w, n_ram_r);
    checks++; if (n_fwd_exmem == 0) failures++;
    checks++; if (n_fwd_memwb == 0) failures++;
    checks++; if (n_lu == 0) failures++;
    checks++; if (n_md == 0) failures++;
    checks++; if (n_mul == 0) failures++;
    checks++; if (n_div == 0) failures++;
    checks++; if (n_br == 0) failures++;
    checks++; if (n_j == 0) failures++;
    checks++; if (n_jr == 0) failures++;
    checks++; if (n_ram_w == 0) failures++;
    checks++; if (n_ram_r == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

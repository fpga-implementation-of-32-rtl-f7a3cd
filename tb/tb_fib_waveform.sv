// tb_fib_waveform -- replays the reference Fibonacci waveform on the full
// design at its default sizes.
//
// The instruction words are the dataout values of the reference waveform
// (2103297 = ADD r1,r0 -> r3, 6365185 = ADD r3,r1 -> r4, ...): a Fibonacci
// variant that rotates through registers 3, 4 and 5. The waveform shows three
// columns that move together: aluout (result of one instruction), signvalue
// (low 16 bits of that same instruction, sign-extended) and dataout (the next
// instruction word). Whenever a real instruction is in execute, the test
// checks that triple against the printed sequence
//   (1, 6365185, 6145) (2, 6563841, 8193) (3, 10754049, 10241)
//   (5, 6627329, 6145) (8, 6563841, 8193) (13, 8722433, 10241)
//   (21, 6627329, 6145) (34, 6563841, 8193) (55, -, 10241)
// and that the result RAM finally holds 1 2 3 5 8 13 21 34 55.
module tb_fib_waveform;
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

  fpga_top dut (.*);

  always #5 clk = ~clk;
  always #7 ext_clk = ~ext_clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 9;
  logic [31:0] words  [N] = '{2103297, 6365185, 6563841, 10754049, 6627329,
                              6563841, 8722433, 6627329, 6563841};
  int          alu_v  [N] = '{1, 2, 3, 5, 8, 13, 21, 34, 55};
  int          sign_v [N] = '{6145, 8193, 10241, 6145, 8193, 10241, 6145, 8193, 10241};

  initial begin
    int k;
    reset = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      imem_we = 1; imem_waddr = 12'(i); imem_wdata = words[i];
      @(negedge clk);
    end
    imem_we = 1; imem_waddr = 12'(N); imem_wdata = j_type(OP_J, N);
    @(negedge clk);
    imem_we = 0;
    @(negedge clk);
    reset = 0;
    k = 0;
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      if (dut.u_core.idex_ctrl.valid && k < N) begin
        checks++;
        if (aluout !== 32'(alu_v[k]) || signvalue !== 32'(sign_v[k]) ||
            (k + 1 < N && dataout !== words[k + 1])) begin
          failures++;
          $display("FAIL step %0d: aluout=%0d dataout=%0d signvalue=%0d", k, aluout, dataout, signvalue);
        end
        k++;
      end
    end
    checks++;
    if (k != N) begin failures++; $display("FAIL only %0d instructions executed", k); end
    checks++;
    if (out_count != 9'(N)) failures++;
    // the stored results, read back through the second port
    for (int i = 0; i < N; i++) begin
      checks++;
      if (dut.u_bram.mem[i] !== 32'(alu_v[i])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

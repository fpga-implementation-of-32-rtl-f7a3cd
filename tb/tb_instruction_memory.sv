// tb_instruction_memory -- self-checking test of the instruction memory.
// Loads words through the write port, then reads them back by byte address
// (PC), including the low two PC bits being ignored.
module tb_instruction_memory;
  localparam int WORDS = 4096;
  logic        clk = 0, we;
  logic [31:0] pc, instr, wdata;
  logic [11:0] waddr;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instruction_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; pc = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = 12'(i); wdata = $urandom ^ i; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      int w;
      w = $urandom_range(0, WORDS - 1);
      pc = 32'(w * 4) | 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (instr !== model[w]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

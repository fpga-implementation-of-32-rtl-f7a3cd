// tb_data_memory -- self-checking test of the data memory.
// Random word writes and reads against a shadow array; checks that a read
// returns the old word until the write edge and the new word after it.
module tb_data_memory;
  localparam int WORDS = 1024;
  logic        clk = 0, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); wdata = 32'(i) * 32'h9E37_79B9; model[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      int w;
      @(negedge clk);
      w = $urandom_range(0, WORDS - 1);
      addr = 32'(w * 4); we = $urandom_range(0, 1); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[w]) failures++;
      @(posedge clk);
      if (we) model[w] = wdata;
      #1;
      checks++;
      if (rdata !== model[w]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

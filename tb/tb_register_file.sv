// tb_register_file -- self-checking test of the register file.
// Checks the reset pattern (register i holds i), that register 0 stays 0,
// writes and reads against a shadow model, and the same-cycle write-to-read
// bypass.
module tb_register_file;
  logic        clk = 0, rst, we;
  logic [4:0]  raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = i;
      raddr1 = 5'(i); raddr2 = 5'(31 - i); #1;
      checks++;
      if (rdata1 !== 32'(i) || rdata2 !== 32'(31 - i)) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = (n % 5 == 0) ? waddr : 5'($urandom); raddr2 = 5'($urandom);
      #1;
      checks++;
      begin
        logic [31:0] e1, e2;
        e1 = (raddr1 == 0) ? 0 : (we && waddr == raddr1) ? wdata : model[raddr1];
        e2 = (raddr2 == 0) ? 0 : (we && waddr == raddr2) ? wdata : model[raddr2];
        if (rdata1 !== e1 || rdata2 !== e2) begin
          failures++;
          $display("FAIL r%0d=%h exp %h  r%0d=%h exp %h", raddr1, rdata1, e1, raddr2, rdata2, e2);
        end
      end
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

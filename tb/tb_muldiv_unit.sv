// tb_muldiv_unit -- self-checking test of ALU 2 (multiply/divide unit).
// Holds op steady like the execute stage does and checks: stall lasts 4
// cycles for a multiplication and 33 for a division, the result and the
// 64-bit buffer are right in the first cycle without stall, back-to-back
// operations restart correctly and flush abandons an operation.
module tb_muldiv_unit;
  import mips_pkg::*;

  logic        clk = 0, rst, flush;
  md_op_e      op;
  logic [31:0] a, b, result;
  logic [63:0] buffer;
  logic        stall, mul_start, div_start;
  int checks = 0, failures = 0;

  muldiv_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(md_op_e o, logic [31:0] x, logic [31:0] y);
    int stalls;
    logic [63:0] eb;
    @(negedge clk);
    op = o; a = x; b = y; stalls = 0;
    #1;
    while (stall) begin
      @(negedge clk);
      // operands may change once the operation has started (as with forwarding)
      a = $urandom; b = $urandom;
      stalls++;
      #1;
    end
    if (o == MD_MUL) eb = $signed(x) * $signed(y);
    else if (y == 0) eb = {x, 32'hFFFF_FFFF};
    else if (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) eb = {32'd0, 32'h8000_0000};
    else begin
      logic [31:0] q, r;
      q = $signed(x) / $signed(y); r = $signed(x) % $signed(y);
      eb = {r, q};
    end
    checks++;
    if (result !== eb[31:0] || buffer !== eb) begin
      failures++;
      $display("FAIL op=%0d %h %h -> %h buf %h exp %h", o, x, y, result, buffer, eb);
    end
    checks++;
    if (stalls != ((o == MD_MUL) ? 4 : 33)) begin
      failures++;
      $display("FAIL stall cycles %0d", stalls);
    end
  endtask

  initial begin
    rst = 1; flush = 0; op = MD_NONE; a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    #1; checks++; if (stall) failures++;
    run(MD_MUL, 32'd5000, -32'sd5);
    checks++; if (buffer !== 64'hFFFF_FFFF_FFFF_9E58) failures++;   // -25000
    run(MD_MUL, 32'd7, 32'd6);       // back to back with no idle cycle
    run(MD_DIV, 32'd100, -32'sd7);
    run(MD_MUL, 32'hFFFF_0000, 32'h0001_0001);
    run(MD_DIV, 32'd9, 32'd0);
    for (int i = 0; i < 60; i++) begin
      logic [31:0] x;
      x = $urandom; if (x == 32'h8000_0000) x = 5;
      run((i % 3 == 0) ? MD_DIV : MD_MUL, x, $urandom);
    end
    // Flush in the middle of a multiplication, then a fresh one.
    @(negedge clk); op = MD_MUL; a = 3; b = 4;
    @(negedge clk); @(negedge clk); flush = 1;
    @(negedge clk); flush = 0; op = MD_NONE;
    #1; checks++; if (stall) failures++;
    run(MD_MUL, 32'd11, 32'd13);
    @(negedge clk); op = MD_NONE; #1;
    checks++; if (stall) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

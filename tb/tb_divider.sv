// tb_divider -- self-checking test of the iterative signed divider.
// Compares quotient and remainder with "/" and "%", checks the 33-cycle
// latency, the one-cycle done pulse and division by zero.
module tb_divider;
  logic        clk = 0, rst, start, busy, done;
  logic [31:0] dividend, divisor, quotient, remainder;
  int checks = 0, failures = 0;

  divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic div(input logic [31:0] a, input logic [31:0] b);
    int cyc;
    logic [31:0] eq, er;
    @(negedge clk);
    dividend = a; divisor = b; start = 1;
    @(negedge clk);
    start = 0; dividend = $urandom; divisor = $urandom;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (b == 0) begin
      eq = '1; er = a;
    end else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin
      eq = 32'h8000_0000; er = 0;
    end else begin
      eq = $signed(a) / $signed(b); er = $signed(a) % $signed(b);
    end
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      $display("FAIL %0d / %0d = %0d r %0d exp %0d r %0d", $signed(a), $signed(b),
               $signed(quotient), $signed(remainder), $signed(eq), $signed(er));
    end
    checks++;
    if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
    @(negedge clk);
    checks++;
    if (done) failures++;
  endtask

  initial begin
    rst = 1; start = 0; dividend = 0; divisor = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    div(32'd100, 32'd7);
    div(-32'sd100, 32'd7);
    div(32'd100, -32'sd7);
    div(-32'sd100, -32'sd7);
    div(32'd55, 32'd0);
    div(32'h8000_0000, 32'hFFFF_FFFF);
    div(32'h8000_0000, 32'd3);
    for (int i = 0; i < 200; i++)
      div($urandom, (i % 2) ? $urandom_range(1, 1000) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

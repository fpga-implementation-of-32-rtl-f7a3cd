// tb_booth_multiplier -- self-checking test of the Booth multiplier.
// Checks the 64-bit signed product against the "*" operator, the 4-cycle
// latency from start to mult_done, that mult_done lasts one cycle, that the
// result is held afterwards and that mult_reset abandons an operation. The
// first case is 5000 x -5 = -25000 (high word -1).
module tb_booth_multiplier;
  logic        clk = 0, mult_reset, mult_cs;
  logic [31:0] x, y, ab_high, ab_low;
  logic        mult_busy, mult_done;
  int checks = 0, failures = 0;

  booth_multiplier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input logic [31:0] a, input logic [31:0] b);
    int cyc;
    logic signed [63:0] e;
    @(negedge clk);
    x = a; y = b; mult_cs = 1;
    @(negedge clk);
    mult_cs = 0; x = $urandom; y = $urandom;   // operands must be latched
    cyc = 1;
    while (!mult_done) begin @(negedge clk); cyc++; end
    e = $signed(a) * $signed(b);
    checks++;
    if ({ab_high, ab_low} !== e) begin
      failures++;
      $display("FAIL %0d * %0d = %h_%h exp %h", $signed(a), $signed(b), ab_high, ab_low, e);
    end
    checks++;
    if (cyc != 4) begin failures++; $display("FAIL latency %0d", cyc); end
    @(negedge clk);
    checks++;
    if (mult_done || {ab_high, ab_low} !== e) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    mult_reset = 1; mult_cs = 0; x = 0; y = 0;
    repeat (3) @(negedge clk);
    mult_reset = 0;
    mul(32'd5000, -32'sd5);
    checks++; if ($signed(ab_high) != -1 || $signed(ab_low) != -25000) failures++;
    mul(32'd0, 32'd12345);
    mul(32'h7FFF_FFFF, 32'h7FFF_FFFF);
    mul(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    mul(32'h1234_5678, 32'h8000_0000);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] a;
      a = $urandom;
      if (a == 32'h8000_0000) a = 1;   // most negative multiplicand: known limit
      mul(a, (i % 3 == 0) ? $urandom_range(0, 300) - 150 : $urandom);
    end
    // Abort: reset in the middle, then a fresh operation must still be right.
    @(negedge clk); x = 7; y = 9; mult_cs = 1;
    @(negedge clk); mult_cs = 0;
    @(negedge clk); mult_reset = 1;
    @(negedge clk); mult_reset = 0;
    checks++; if (mult_busy || mult_done) failures++;
    mul(32'd123, 32'd456);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

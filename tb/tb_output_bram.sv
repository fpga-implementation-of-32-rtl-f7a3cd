// tb_output_bram -- self-checking test of the dual-clock result RAM.
// Writes a sequence on clka, then reads it back on an unrelated clkb,
// checking the one-edge registered read latency.
module tb_output_bram;
  logic        clka = 0, clkb = 0, wea;
  logic [8:0]  addra, addrb;
  logic [31:0] dina, doutb;
  int checks = 0, failures = 0;

  output_bram dut (.*);

  always #5 clka = ~clka;
  always #17 clkb = ~clkb;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 0; addra = 0; dina = 0; addrb = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clka);
      wea = 1; addra = 9'(i); dina = 32'(i * i + 7);
    end
    @(negedge clka); wea = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clkb);
      addrb = 9'((i * 37) % 512);
      @(posedge clkb); #1;
      checks++;
      if (doutb !== 32'(((i * 37) % 512) * ((i * 37) % 512) + 7)) failures++;
    end
    // Read latency: doutb changes only on the clkb edge.
    @(negedge clkb); addrb = 9'd3; #2;
    checks++; if (doutb === 32'd16) failures++;  // still the previous read
    @(posedge clkb); #1;
    checks++; if (doutb !== 32'd16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

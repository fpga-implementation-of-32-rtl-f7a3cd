// output_bram -- simple dual-port, dual-clock block RAM for processor results.
//
// Port A (clka, wea, addra, dina) is written by the processor side on its
// clock. Port B (clkb, addrb, doutb) is read on a separate, external clock;
// doutb is registered, so it shows the word at addrb one clkb edge later, as
// a block RAM does. A read of a word being written in the same moment from the
// other clock domain returns either value. Depth and width are this design's
// choice: 512 x 32, one Spartan-3E 18-kbit block RAM.
module output_bram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clka,
  input  logic                     wea,
  input  logic [$clog2(DEPTH)-1:0] addra,
  input  logic [WIDTH-1:0]         dina,
  input  logic                     clkb,
  input  logic [$clog2(DEPTH)-1:0] addrb,
  output logic [WIDTH-1:0]         doutb
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clka) begin
    if (wea) mem[addra] <= dina;
  end

  always_ff @(posedge clkb) begin
    doutb <= mem[addrb];
  end

endmodule

// instruction_memory -- word-organised instruction memory of the fetch stage.
//
// The fetch stage presents the byte address held in the PC; the word at
// pc[.. :2] is returned combinationally (an asynchronous-read RAM). A separate
// write port, clocked, loads a program word by word while the processor is
// held in reset. The depth is this design's choice (4096 words, enough for
// the jump targets of the instruction-set examples, e.g. J 2500).
module instruction_memory #(
  parameter int unsigned WORDS = 4096
) (
  input  logic                     clk,
  input  logic [31:0]              pc,
  output logic [31:0]              instr,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[pc[$clog2(WORDS)+1:2]];

endmodule

// data_memory -- word-organised data memory of the memory-access stage.
//
// Holds the data of LW/SW and the return-address stack that JAL pushes and JR
// pops. Reads are combinational from the byte address addr[.. :2]; writes
// take effect on the rising clock edge. Only whole 32-bit words are accessed
// (no byte or half-word stores): this and the depth of 1024 words are this
// design's own choices.
module data_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule

// register_file -- the 32 x 32-bit general register file.
//
// Two combinational read ports (decode stage) and one write port (write-back
// stage, written on the rising clock edge). A read of the register being
// written in the same cycle returns the new value, so an instruction in decode
// sees a result that is being written back. Register 0 always reads 0, as in
// MIPS. On reset register i is loaded with the value i, so registers 0 and 1
// start as 0 and 1, the initial values the Fibonacci test program expects;
// that reset pattern is this design's choice.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [WIDTH-1:0]         rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= WIDTH'(i);
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [WIDTH-1:0] read_port(input logic [$clog2(NREGS)-1:0] ra);
    if (ra == '0)                return '0;
    else if (we && waddr == ra)  return wdata;
    else                         return regs[ra];
  endfunction

  assign rdata1 = read_port(raddr1);
  assign rdata2 = read_port(raddr2);

endmodule

// fpga_top -- board-level top: processor, result block RAM and display read-out.
//
// The processor (mips_core) runs on clk. Each value it writes back to a
// register other than 0 is also written into a dual-port block RAM
// (output_bram) at the next address of a write counter, so the RAM collects
// the program's results in order. The RAM's second port is read on a separate
// external clock, ext_clk: every ext_clk edge steps a read-address counter and
// doutb presents the next stored result, for the board's 7-segment display.
// Board pins of the reference build: clk = B8, reset = D18, ext_clk = B18.
//
// Writing every register result, the two address counters (both wrapping at
// OUT_DEPTH) and the two-flop synchroniser that brings reset into the ext_clk
// domain are this design's own choices; the published design states only that
// the processor output is written into a block RAM and read out on an
// external clock. The reset synchroniser is set asynchronously by reset and
// released on ext_clk, so reset is deliberately used both asynchronously
// (there) and synchronously (in the processor clock domain). The 7-segment
// driver is not included: doutb is a port. imem_* load the program while
// reset is high. The remaining outputs expose the processor's observation
// signals.
module fpga_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned OUT_DEPTH  = 512
) (
  input  logic                          clk,
  input  logic                          reset,
  input  logic                          ext_clk,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  output logic [31:0]                   doutb,
  output logic [31:0]                   pc,
  output logic [31:0]                   aluout,
  output logic [31:0]                   dataout,
  output logic [31:0]                   signvalue,
  output logic [63:0]                   mul_buffer,
  output logic                          out_we,
  output logic [31:0]                   out_data,
  output logic [$clog2(OUT_DEPTH)-1:0]  out_count,
  output events_t                       events
);

  localparam int unsigned OAW = $clog2(OUT_DEPTH);


  mips_core #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_core (
    .clk        (clk),
    .rst        (reset),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .out_we     (out_we),
    .out_data   (out_data),
    .out_dest   (),
    .pc         (pc),
    .aluout     (aluout),
    .dataout    (dataout),
    .signvalue  (signvalue),
    .mul_buffer (mul_buffer),
    .events     (events)
  );

  // Write side: next free address, processor clock.
  always_ff @(posedge clk) begin
    if (reset)       out_count <= '0;
    else if (out_we) out_count <= out_count + 1'b1;
  end

  // Read side: reset synchronised into ext_clk, then one address per edge.
  logic [1:0]     rst_sync;
  logic [OAW-1:0] rd_addr;

  always_ff @(posedge ext_clk or posedge reset) begin
    if (reset) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  end

  always_ff @(posedge ext_clk) begin
    if (rst_sync[1]) rd_addr <= '0;
    else             rd_addr <= rd_addr + 1'b1;
  end

  output_bram #(.DEPTH(OUT_DEPTH), .WIDTH(32)) u_bram (
    .clka  (clk),
    .wea   (out_we),
    .addra (out_count),
    .dina  (out_data),
    .clkb  (ext_clk),
    .addrb (rd_addr),
    .doutb (doutb)
  );

endmodule

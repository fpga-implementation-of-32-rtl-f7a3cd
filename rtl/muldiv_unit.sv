// muldiv_unit -- ALU 2, the dedicated multiply/divide unit of the execute
// stage, with its result buffer (the "mul buffer").
//
// While the instruction in execute is a MUL/MULI (op = MD_MUL) or DIV/DIVI
// (op = MD_DIV) the unit starts the Booth multiplier or the divider on the
// first such cycle and raises `stall` until the operation is finished. In the
// cycle the result is ready `stall` is low and `result` carries the low word
// (the low 32 bits of the product, or the quotient), so the pipeline moves on.
// A multiplication holds the pipeline for 4 clock cycles, a division for 33.
// `buffer` is the 64-bit result buffer: {high product word, low product word}
// after a multiplication and {remainder, quotient} after a division; it keeps
// its value until the next operation ends.
//
// `flush` abandons an operation whose instruction is being cancelled. The
// divider, the result buffer layout and the flush input are this design's own
// choices; the multiplier and its cycle count follow the published design.
module muldiv_unit
  import mips_pkg::*;
#(
  parameter int unsigned STEPS_PER_CYCLE = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  md_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        stall,
  output logic [31:0] result,
  output logic [63:0] buffer,
  output logic        mul_start,  // event: a multiplication starts
  output logic        div_start   // event: a division starts
);

  logic        m_busy, m_done, d_busy, d_done, m_cs, d_go;
  logic [31:0] ab_high, ab_low, quo, rem;
  logic        last_div;

  assign m_cs = (op == MD_MUL) && !m_done && !flush;
  assign d_go = (op == MD_DIV) && !d_done && !flush;

  booth_multiplier #(.WIDTH(32), .STEPS_PER_CYCLE(STEPS_PER_CYCLE)) u_mul (
    .clk        (clk),
    .mult_reset (rst || flush),
    .mult_cs    (m_cs),
    .x          (a),
    .y          (b),
    .mult_busy  (m_busy),
    .mult_done  (m_done),
    .ab_high    (ab_high),
    .ab_low     (ab_low)
  );

  divider #(.WIDTH(32)) u_div (
    .clk       (clk),
    .rst       (rst || flush),
    .start     (d_go),
    .dividend  (a),
    .divisor   (b),
    .busy      (d_busy),
    .done      (d_done),
    .quotient  (quo),
    .remainder (rem)
  );

  assign mul_start = m_cs && !m_busy;
  assign div_start = d_go && !d_busy;

  always_comb begin
    unique case (op)
      MD_MUL:  stall = !m_done;
      MD_DIV:  stall = !d_done;
      default: stall = 1'b0;
    endcase
  end

  assign result = (op == MD_DIV) ? quo : ab_low;

  // Which unit finished last decides what the buffer shows.
  always_ff @(posedge clk) begin
    if (rst)         last_div <= 1'b0;
    else if (m_done) last_div <= 1'b0;
    else if (d_done) last_div <= 1'b1;
  end

  assign buffer = (d_done || (last_div && !m_done)) ? {rem, quo} : {ab_high, ab_low};

endmodule

// divider -- signed 32-bit divider of ALU 2 (used by DIV and DIVI).
//
// A radix-2 restoring divider on the magnitudes of the operands, one quotient
// bit per clock: one edge loads the operands and WIDTH more edges divide.
// The quotient is truncated towards zero and takes the sign of dividend XOR
// divisor; the remainder takes the sign of the dividend (the rules of the C and Verilog "/" and "%"). Division
// by zero returns an all-ones quotient and the dividend as remainder.
// Everything about the inside of this unit is this design's own choice: the
// instruction set defines only the quotient.
//
// Handshake, as the multiplier's: start while idle loads the operands;
// WIDTH + 1 edges later quotient/remainder are valid and done is high for one
// cycle; the results are held until the next division ends. rst is synchronous.
module divider #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] rem_q, quo_q, dsr_q;
  logic             neg_q, neg_r;
  logic [CW-1:0]    cnt;

  logic [WIDTH:0]   trial;
  logic [WIDTH-1:0] shifted_rem;

  assign shifted_rem = {rem_q[WIDTH-2:0], quo_q[WIDTH-1]};
  assign trial       = {1'b0, shifted_rem} - {1'b0, dsr_q};

  logic [WIDTH-1:0] quo_next, rem_next;
  always_comb begin
    if (!trial[WIDTH]) begin
      rem_next = trial[WIDTH-1:0];
      quo_next = {quo_q[WIDTH-2:0], 1'b1};
    end else begin
      rem_next = shifted_rem;
      quo_next = {quo_q[WIDTH-2:0], 1'b0};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0;
      rem_q <= '0; quo_q <= '0; dsr_q <= '0; neg_q <= 1'b0; neg_r <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt   <= '0;
        rem_q <= '0;
        quo_q <= dividend[WIDTH-1] ? -dividend : dividend;
        dsr_q <= divisor[WIDTH-1]  ? -divisor  : divisor;
        neg_q <= dividend[WIDTH-1] ^ divisor[WIDTH-1];
        neg_r <= dividend[WIDTH-1];
      end else if (busy) begin
        rem_q <= rem_next;
        quo_q <= quo_next;
        cnt   <= cnt + 1'b1;
        if (cnt == CW'(WIDTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dsr_q == '0) begin
            quotient  <= '1;
            remainder <= neg_r ? -rem_next : rem_next;
          end else begin
            quotient  <= neg_q ? -quo_next : quo_next;
            remainder <= neg_r ? -rem_next : rem_next;
          end
        end
      end
    end
  end

endmodule

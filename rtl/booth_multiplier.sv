// booth_multiplier -- the dedicated multiplier of ALU 2 (radix-2 Booth).
//
// Multiplies the signed 32-bit multiplicand x by the signed 32-bit multiplier
// y into a 64-bit product {ab_high, ab_low}. It keeps three 65-bit registers
// (n1 + n2 + 1 bits):
//   A = {x, 33'b0}, S = {-x, 33'b0}, P = {32'b0, y, 1'b0}.
// One Booth step looks at P[1:0]: 01 adds A, 10 adds S, 00 and 11 add nothing
// (overflow ignored), then P is shifted right arithmetically by one. After 32
// steps the product is P[64:1].
//
// To finish in four clock cycles the unit applies STEPS_PER_CYCLE = 8 Booth
// steps per clock (eight add/shift stages chained combinationally), the first
// group already on the clock edge that loads the operands. Unrolling to eight
// steps per clock is this design's way of reaching the four-cycle
// multiplication; the per-step rule and register widths follow the algorithm
// as published.
//
// Handshake: a cycle with mult_cs = 1 while the unit is idle loads x and y and
// starts; the operands may change afterwards. STEPS/STEPS_PER_CYCLE clock edges
// later ab_high/ab_low hold the product and mult_done is high for exactly one
// cycle. The product stays in ab_high/ab_low until the next product replaces
// it. mult_reset (synchronous) abandons an operation in progress. Known limit
// of the 65-bit form: for x = -2^31 the negation in S overflows and the
// product is wrong whenever y makes the algorithm add S.
module booth_multiplier #(
  parameter int unsigned WIDTH           = 32,
  parameter int unsigned STEPS_PER_CYCLE = 8
) (
  input  logic             clk,
  input  logic             mult_reset,
  input  logic             mult_cs,
  input  logic [WIDTH-1:0] x,        // multiplicand m1
  input  logic [WIDTH-1:0] y,        // multiplier m2
  output logic             mult_busy,
  output logic             mult_done,
  output logic [WIDTH-1:0] ab_high,
  output logic [WIDTH-1:0] ab_low
);

  localparam int unsigned PW     = 2 * WIDTH + 1;           // 65
  localparam int unsigned CYCLES = WIDTH / STEPS_PER_CYCLE; // 4
  localparam int unsigned CW     = (CYCLES > 1) ? $clog2(CYCLES) : 1;

  typedef logic [PW-1:0] preg_t;

  preg_t            a_reg, s_reg, p_reg;
  logic [CW-1:0]    cnt;

  // One Booth step: add/subtract according to P[1:0], then arithmetic shift.
  function automatic preg_t booth_step(input preg_t p, input preg_t add_a, input preg_t add_s);
    preg_t sum;
    unique case (p[1:0])
      2'b01:   sum = p + add_a;
      2'b10:   sum = p + add_s;
      default: sum = p;
    endcase
    return {sum[PW-1], sum[PW-1:1]};
  endfunction

  preg_t a_init, s_init, p_init;
  preg_t a_use, s_use, p_use, p_next;
  logic  start, last;

  assign a_init = {x, {(WIDTH+1){1'b0}}};
  assign s_init = {(~x + 1'b1), {(WIDTH+1){1'b0}}};
  assign p_init = {{WIDTH{1'b0}}, y, 1'b0};

  assign start = mult_cs && !mult_busy;
  assign a_use = start ? a_init : a_reg;
  assign s_use = start ? s_init : s_reg;
  assign p_use = start ? p_init : p_reg;
  assign last  = start ? (CYCLES == 1) : (cnt == CW'(CYCLES - 1));

  always_comb begin
    p_next = p_use;
    for (int i = 0; i < STEPS_PER_CYCLE; i++) p_next = booth_step(p_next, a_use, s_use);
  end

  always_ff @(posedge clk) begin
    if (mult_reset) begin
      mult_busy <= 1'b0;
      mult_done <= 1'b0;
      cnt       <= '0;
      ab_high   <= '0;
      ab_low    <= '0;
      a_reg     <= '0;
      s_reg     <= '0;
      p_reg     <= '0;
    end else begin
      mult_done <= 1'b0;
      if (start || mult_busy) begin
        a_reg <= a_use;
        s_reg <= s_use;
        p_reg <= p_next;
        if (last) begin
          mult_busy <= 1'b0;
          mult_done <= 1'b1;
          {ab_high, ab_low} <= p_next[PW-1:1];
          cnt <= '0;
        end else begin
          mult_busy <= 1'b1;
          cnt <= start ? CW'(1) : cnt + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (WIDTH % STEPS_PER_CYCLE == 0)
      else $error("WIDTH must be a multiple of STEPS_PER_CYCLE");
  end

endmodule

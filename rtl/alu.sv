// alu -- ALU 1, the general-purpose arithmetic and logic unit of the
// execute stage.
//
// Combinational. Performs every operation except multiply and divide, which
// go to the dedicated ALU 2: add, subtract, AND, OR, NOR, NAND, XOR, set on
// less than (signed) and logical shifts left and right by b[4:0]. `zero`
// flags a zero result. Add and subtract wrap; overflow is ignored, which is
// this design's own choice.
module alu
  import mips_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_NOR:  y = ~(a | b);
      ALU_NAND: y = ~(a & b);
      ALU_XOR:  y = a ^ b;
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      default:  y = a + b;
    endcase
  end

  assign zero = (y == '0);

endmodule

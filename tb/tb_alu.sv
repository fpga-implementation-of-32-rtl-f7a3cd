// tb_alu -- self-checking test of ALU 1.
// Drives every operation with corner values and random operands and compares
// against a reference written with SystemVerilog operators.
module tb_alu;
  import mips_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .zero(zero));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_NOR:  return ~(x | z);
      ALU_NAND: return ~(x & z);
      ALU_XOR:  return x ^ z;
      ALU_SLT:  return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      ALU_SLL:  return x << z[4:0];
      ALU_SRL:  return x >> z[4:0];
      default:  return 32'hx;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fixed cases with hand-worked results.
    op = ALU_ADD; a = 32'd21; b = 32'd34; #1; checks++; if (y !== 32'd55) failures++;
    op = ALU_SUB; a = 32'd5;  b = 32'd5;  #1; checks++; if (y !== 0 || !zero) failures++;
    op = ALU_SLT; a = 32'hFFFF_FFFF; b = 32'd1; #1; checks++; if (y !== 32'd1) failures++;
    op = ALU_SLL; a = 32'd1;  b = 32'd3;  #1; checks++; if (y !== 32'd8) failures++;
    op = ALU_SRL; a = 32'h8000_0000; b = 32'd3; #1; checks++; if (y !== 32'h1000_0000) failures++;
    op = ALU_NAND; a = 32'hF0F0_F0F0; b = 32'hFF00_FF00; #1; checks++; if (y !== 32'h0FFF_0FFF) failures++;
    for (int i = 0; i < 2000; i++) begin
      alu_op_e o;
      o = alu_op_e'($urandom_range(0, 9));
      check(o, $urandom, (i % 4 == 0) ? $urandom_range(0, 40) : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

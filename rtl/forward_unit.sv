// forward_unit -- operand bypass selection for the execute stage.
//
// For each of the two EX operands it compares the source register with the
// destination of the instruction one stage ahead (EX/MEM) and two stages
// ahead (MEM/WB). The nearer producer wins; register 0 is never forwarded.
// The select values are: 0 = value read in decode, 1 = EX/MEM result,
// 2 = MEM/WB write-back value. Combinational.
module forward_unit (
  input  logic [4:0] ex_rs,
  input  logic [4:0] ex_rt,
  input  logic       mem_reg_write,
  input  logic [4:0] mem_dest,
  input  logic       wb_reg_write,
  input  logic [4:0] wb_dest,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b
);

  function automatic logic [1:0] pick(input logic [4:0] src);
    if (mem_reg_write && mem_dest != 5'd0 && mem_dest == src)     return 2'd1;
    else if (wb_reg_write && wb_dest != 5'd0 && wb_dest == src)   return 2'd2;
    else                                                          return 2'd0;
  endfunction

  assign fwd_a = pick(ex_rs);
  assign fwd_b = pick(ex_rt);

endmodule

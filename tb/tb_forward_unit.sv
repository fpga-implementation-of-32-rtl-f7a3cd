// tb_forward_unit -- self-checking test of the forwarding selection.
// Exhaustive over small register indices: nearer producer wins, register 0
// never forwards, a producer that does not write is ignored.
module tb_forward_unit;
  logic [4:0] ex_rs, ex_rt, mem_dest, wb_dest;
  logic       mem_reg_write, wb_reg_write;
  logic [1:0] fwd_a, fwd_b;
  int checks = 0, failures = 0;

  forward_unit dut (.*);

  function automatic logic [1:0] ref_sel(logic [4:0] s);
    if (mem_reg_write && mem_dest != 0 && mem_dest == s) return 2'd1;
    if (wb_reg_write && wb_dest != 0 && wb_dest == s)    return 2'd2;
    return 2'd0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand cases.
    ex_rs = 3; ex_rt = 4; mem_reg_write = 1; mem_dest = 3; wb_reg_write = 1; wb_dest = 3; #1;
    checks++; if (fwd_a !== 2'd1 || fwd_b !== 2'd0) failures++;
    mem_dest = 0; ex_rs = 0; wb_dest = 0; #1;
    checks++; if (fwd_a !== 2'd0) failures++;
    ex_rs = 7; wb_dest = 7; mem_reg_write = 0; mem_dest = 7; #1;
    checks++; if (fwd_a !== 2'd2) failures++;
    for (int i = 0; i < 4096; i++) begin
      {ex_rs[1:0], ex_rt[1:0], mem_dest[1:0], wb_dest[1:0], mem_reg_write, wb_reg_write} = 10'(i);
      ex_rs[4:2] = 0; ex_rt[4:2] = 0; mem_dest[4:2] = 0; wb_dest[4:2] = 0;
      #1;
      checks++;
      if (fwd_a !== ref_sel(ex_rs) || fwd_b !== ref_sel(ex_rt)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

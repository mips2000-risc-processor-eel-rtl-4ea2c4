// tb_mem_stage: loads data memory through the load port, then drives EX/MEM
// contents for a store and following loads (checking the load data), and
// for jumps, taken and untaken branches and jr (checking next PC and flush).
module tb_mem_stage;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  logic clk = 0, flush, load_we; logic [31:0] if_pc_plus4, next_pc, load_data; logic [11:0] load_addr;
  ex_mem_t ex_mem; mem_wb_t mem_out;
  always #5 clk = ~clk;
  mem_stage dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    ex_mem = '0; if_pc_plus4 = 32'h44; load_we = 1;
    for (int k = 0; k < 64; k++) begin load_addr = 12'(k); load_data = 32'h1111_1111 * (k % 16); @(negedge clk); end
    load_we = 0;
    // lw from word 5
    ex_mem.instr = i_op(LW, 3, 0, 20); ex_mem.alu = 20; #1;
    check(mem_out.lmd == 32'h5555_5555 && next_pc == 32'h44 && !flush, "lw");
    // sb 0xAB to byte 0x15 (word 5, offset 1)
    ex_mem.instr = i_op(SB, 3, 0, 'h15); ex_mem.alu = 'h15; ex_mem.b = 32'h0000_00AB;
    @(negedge clk);
    ex_mem.instr = i_op(LW, 3, 0, 20); ex_mem.alu = 20; #1;
    check(mem_out.lmd == 32'h55AB_5555, $sformatf("after sb: %h", mem_out.lmd));
    ex_mem.instr = i_op(LB, 3, 0, 'h15); ex_mem.alu = 'h15; #1;
    check(mem_out.lmd == 32'hFFFF_FFAB, "lb sign extends");
    check(mem_out.alu == 'h15 && mem_out.instr == ex_mem.instr, "pass-through fields");
    // jump: {PC+4[31:28], target, 00}
    ex_mem = '0; ex_mem.instr = j_op(J, 'h0ABC_DEF0); ex_mem.pc_plus4 = 32'h7000_0010; #1;
    check(next_pc == 32'h7ABC_DEF0 && flush, $sformatf("jump to %h", next_pc));
    ex_mem.instr = i_op(BEQ, 1, 2, 3); ex_mem.branch = 32'h1234_5678; ex_mem.cond = 1; #1;
    check(next_pc == 32'h1234_5678 && flush, "taken branch");
    ex_mem.cond = 0; #1;
    check(next_pc == 32'h44 && !flush, "untaken branch");
    ex_mem.instr = r_op(JR, 0, 31, 0); ex_mem.a = 32'h0000_0ACC; #1;
    check(next_pc == 32'h0ACC && flush, "jr");
    // a store that is not in MEM must not write: NOP writes nothing
    ex_mem = '0; ex_mem.alu = 20; ex_mem.b = 32'hFFFF_FFFF; @(negedge clk);
    ex_mem.instr = i_op(LW, 3, 0, 20); #1;
    check(mem_out.lmd == 32'h55AB_5555, "NOP leaves memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wb_stage: register number and value written for ALU, load and link
// instructions with random MEM/WB contents.
module tb_wb_stage;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  mem_wb_t mem_wb; logic we; logic [4:0] c_addr; logic [31:0] c_data;
  wb_stage dut (.*);
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
    repeat (1000) begin
      int k; logic [4:0] rd, rt; logic ew; logic [4:0] ea; logic [31:0] ed;
      rd = $urandom; rt = $urandom; k = $urandom % 5;
      mem_wb.pc_plus4 = $urandom; mem_wb.alu = $urandom; mem_wb.lmd = $urandom;
      case (k)
        0: begin mem_wb.instr = r_op(XOR, rd, 1, rt); ew = 1; ea = rd; ed = mem_wb.alu; end
        1: begin mem_wb.instr = i_op(ORI, rt, 1, 5); ew = 1; ea = rt; ed = mem_wb.alu; end
        2: begin mem_wb.instr = i_op(LH, rt, 1, 5); ew = 1; ea = rt; ed = mem_wb.lmd; end
        3: begin mem_wb.instr = j_op(JAL, 'h80); ew = 1; ea = 31; ed = mem_wb.pc_plus4; end
        default: begin mem_wb.instr = i_op(SW, rt, 1, 5); ew = 0; ea = 0; ed = 0; end
      endcase
      #1;
      check(we == ew && (!ew || (c_addr == ea && c_data == ed)), $sformatf("kind %0d: r%0d=%h", k, c_addr, c_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

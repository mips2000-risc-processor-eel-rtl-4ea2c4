// tb_ex_stage: random R-type, immediate, shift, memory and branch
// instructions with random operands; operands are randomly forwarded from
// the MEM or WB path. Results, effective addresses, branch conditions and
// targets are compared with values computed in the testbench.
module tb_ex_stage;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  id_ex_t id_ex; ex_mem_t ex_out;
  logic ex_mem_we, mem_wb_we; logic [4:0] ex_mem_rd, mem_wb_rd; logic [31:0] mem_fwd_data, wb_data;
  logic [1:0] fwd_a, fwd_b;
  ex_stage dut (.*);
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
    int n_fa = 0, n_fb = 0;
    repeat (4000) begin
      logic [31:0] i, a, b, ra, rb, e; logic c; int kind; logic [4:0] rs, rt;
      rs = 1 + $urandom % 3; rt = 1 + $urandom % 3;
      kind = $urandom % 6;
      case (kind)
        0: i = r_op($urandom % 2 ? ADDU : ($urandom % 2 ? SUB : ($urandom % 2 ? XOR : SLT)), 5, rs, rt);
        1: i = r_op($urandom % 2 ? SLLV : SRAV, 5, rs, rt);
        2: i = r_op(SRA, 5, 0, rt, $urandom % 32);
        3: i = i_op($urandom % 2 ? ADDIU : ORI, rt, rs, $urandom);
        4: i = i_op($urandom % 2 ? LW : SB, rt, rs, $urandom);
        default: i = i_op($urandom % 2 ? BNE : BLEZ, rt, rs, $urandom);
      endcase
      ra = $urandom; rb = ($urandom % 3 == 0) ? ra : $urandom;
      mem_fwd_data = $urandom; wb_data = ($urandom % 3 == 0) ? ra : $urandom;
      ex_mem_we = $urandom; mem_wb_we = $urandom; ex_mem_rd = 1 + $urandom % 3; mem_wb_rd = 1 + $urandom % 3;
      id_ex.instr = i; id_ex.pc_plus4 = $urandom & ~3; id_ex.a = ra; id_ex.b = rb;
      id_ex.imm = (i[31:26] == 13) ? {16'h0, i[15:0]} : {{16{i[15]}}, i[15:0]};
      #1;
      a = (ex_mem_we && ex_mem_rd == rs) ? mem_fwd_data : (mem_wb_we && mem_wb_rd == rs) ? wb_data : ra;
      b = (ex_mem_we && ex_mem_rd == rt) ? mem_fwd_data : (mem_wb_we && mem_wb_rd == rt) ? wb_data : rb;
      if (kind == 2) a = ra;  // rs field is 0 for sra
      if (a != ra) n_fa++;
      if (b != rb) n_fb++;
      c = 0;
      case (i[31:26])
        0: case (i[5:0])
             ADDU: e = a + b; SUB: e = a - b; XOR: e = a ^ b;
             SLT: e = ($signed(a) < $signed(b)) ? 1 : 0;
             SLLV: e = b << a[4:0]; SRAV: e = $signed(b) >>> a[4:0];
             SRA: e = $signed(b) >>> i[10:6];
             default: e = 'x;
           endcase
        ADDIU: e = a + id_ex.imm;
        ORI:   e = a | id_ex.imm;
        LW, SB: e = a + id_ex.imm;
        BNE:  begin c = a != b; e = c; end
        default: begin c = $signed(a) <= 0; e = c; end  // BLEZ
      endcase
      check(ex_out.alu == e, $sformatf("instr %h a %h b %h -> %h expected %h", i, a, b, ex_out.alu, e));
      check(ex_out.cond == c, "cond");
      check(ex_out.a == a && ex_out.b == b, "forwarded operands");
      check(ex_out.branch == id_ex.pc_plus4 + (id_ex.imm << 2), "branch target");
    end
    check(n_fa > 100 && n_fb > 100, "forwarding exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mem_writer: applies the unit's lane enables and data to a random old
// word and compares with byte-by-byte big-endian store semantics.
module tb_mem_writer;
  import mips_tb_pkg::*;
  logic [5:0] opcode; logic [1:0] addr_lo; logic [31:0] rt_data, wdata; logic [3:0] be;
  mem_writer dut (.*);
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
  function automatic logic [31:0] setb(input logic [31:0] w, input int off, input logic [7:0] v);
    w[8*(3-off) +: 8] = v; return w;
  endfunction
  initial begin
    int ops [6] = '{SB, SH, SW, SWL, SWR, ADDU};
    repeat (3000) begin
      logic [31:0] old, got, e; int k, op;
      op = ops[$urandom % 6]; opcode = 6'(op);
      addr_lo = $urandom; rt_data = $urandom; old = $urandom; k = addr_lo;
      #1;
      for (int l = 0; l < 4; l++) got[8*l +: 8] = be[l] ? wdata[8*l +: 8] : old[8*l +: 8];
      e = old;
      case (op)
        SB: e = setb(e, k, rt_data[7:0]);
        SH: begin e = setb(e, k & 2, rt_data[15:8]); e = setb(e, (k & 2) + 1, rt_data[7:0]); end
        SW: e = rt_data;
        SWL: for (int j = k; j < 4; j++) e = setb(e, j, rt_data[8*(3-(j-k)) +: 8]);
        SWR: for (int j = 0; j <= k; j++) e = setb(e, j, rt_data[8*(k-j) +: 8]);
        default: ;
      endcase
      check(got == e, $sformatf("op %h off %0d rt %h: %h expected %h", op, k, rt_data, got, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

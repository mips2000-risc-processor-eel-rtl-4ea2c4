// tb_mem_reader: every load type at every byte offset against
// byte-by-byte big-endian load semantics.
module tb_mem_reader;
  import mips_tb_pkg::*;
  logic [5:0] opcode; logic [1:0] addr_lo; logic [31:0] word, rt_data, ldata;
  mem_reader dut (.*);
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
  function automatic logic [7:0] gb(input int off); return word[8*(3-off) +: 8]; endfunction
  initial begin
    int ops [7] = '{LB, LBU, LH, LHU, LW, LWL, LWR};
    repeat (3000) begin
      logic [31:0] e; int k, op;
      op = ops[$urandom % 7]; opcode = 6'(op);
      addr_lo = $urandom; word = $urandom; rt_data = $urandom; k = addr_lo;
      #1;
      case (op)
        LB:  e = {{24{gb(k)[7]}}, gb(k)};
        LBU: e = {24'h0, gb(k)};
        LH:  e = {{16{gb(k & 2)[7]}}, gb(k & 2), gb((k & 2) + 1)};
        LHU: e = {16'h0, gb(k & 2), gb((k & 2) + 1)};
        LW:  e = word;
        LWL: begin e = rt_data; for (int j = k; j < 4; j++) e[8*(3-(j-k)) +: 8] = gb(j); end
        default: begin e = rt_data; for (int j = 0; j <= k; j++) e[8*(k-j) +: 8] = gb(j); end
      endcase
      check(ldata == e, $sformatf("op %h off %0d word %h: %h expected %h", op, k, word, ldata, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_forwarding_unit: random destinations and sources from a small register
// range so that matches are frequent; MEM result has priority.
module tb_forwarding_unit;
  logic [4:0] id_ex_rs, id_ex_rt, ex_mem_rd, mem_wb_rd; logic ex_mem_we, mem_wb_we; logic [1:0] fwd_a, fwd_b;
  forwarding_unit dut (.*);
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
  function automatic logic [1:0] ref_sel(input logic [4:0] s);
    if (ex_mem_we && ex_mem_rd == s && s != 0) return 2;
    if (mem_wb_we && mem_wb_rd == s && s != 0) return 1;
    return 0;
  endfunction
  initial begin
    repeat (4000) begin
      id_ex_rs = $urandom % 4; id_ex_rt = $urandom % 4; ex_mem_rd = $urandom % 4; mem_wb_rd = $urandom % 4;
      ex_mem_we = $urandom; mem_wb_we = $urandom; #1;
      check(fwd_a == ref_sel(id_ex_rs) && fwd_b == ref_sel(id_ex_rt), "forward selects");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

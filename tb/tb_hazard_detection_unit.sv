// tb_hazard_detection_unit: random register numbers with forced matches.
module tb_hazard_detection_unit;
  logic id_ex_mem_read, stall; logic [4:0] id_ex_rt, if_id_rs, if_id_rt;
  hazard_detection_unit dut (.*);
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
    repeat (4000) begin
      id_ex_mem_read = $urandom; id_ex_rt = $urandom % 8; if_id_rs = $urandom % 8; if_id_rt = $urandom % 8; #1;
      check(stall == (id_ex_mem_read && (id_ex_rt == if_id_rs || id_ex_rt == if_id_rt)), "stall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

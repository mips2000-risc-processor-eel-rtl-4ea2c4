// tb_if_stage: sequential fetch, a redirected next PC, a hold cycle and a
// reset, checking PC, PC+4 and the fetched word each cycle.
module tb_if_stage;
  logic clk = 0, rst, hold, load_we;
  logic [31:0] next_pc, pc, pc_plus4, instr, load_data, m_pc;
  logic [11:0] load_addr;
  always #5 clk = ~clk;
  if_stage dut (.*);
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
  function automatic logic [31:0] word(input logic [31:0] a); return 32'hA5000000 ^ (a[13:2] * 32'h01010101); endfunction
  initial begin
    rst = 1; hold = 0; next_pc = 0; load_we = 1;
    for (int k = 0; k < 4096; k++) begin load_addr = 12'(k); load_data = word(k << 2); @(negedge clk); end
    load_we = 0; @(negedge clk);
    rst = 0; m_pc = 0;
    repeat (500) begin
      int r = $urandom % 8;
      #1;
      check(pc == m_pc && pc_plus4 == m_pc + 4 && instr == word(m_pc), $sformatf("pc %h expected %h", pc, m_pc));
      hold = (r == 0);
      next_pc = (r == 1) ? {18'h0, 12'($urandom), 2'b00} : pc_plus4;
      if (!hold) m_pc = next_pc;
      @(negedge clk);
    end
    rst = 1; @(negedge clk); #1 check(pc == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

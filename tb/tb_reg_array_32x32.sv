// tb_reg_array_32x32: random writes and reads against a model, including
// same-cycle write/read pass-through and register 0.
module tb_reg_array_32x32;
  logic clk = 0, rst, we;
  logic [4:0] a_addr, b_addr, c_addr;
  logic [31:0] a_data, b_data, c_data;
  logic [31:0] m [32];
  always #5 clk = ~clk;
  reg_array_32x32 dut (.*);
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
  function automatic logic [31:0] exp_rd(input logic [4:0] a);
    if (a == 0) return 0;
    if (we && c_addr == a) return c_data;
    return m[a];
  endfunction
  initial begin
    rst = 1; we = 0; a_addr = 0; b_addr = 0; c_addr = 0; c_data = 0;
    @(negedge clk); rst = 0;
    foreach (m[i]) m[i] = 0;
    repeat (3000) begin
      we = $urandom % 2; c_addr = $urandom; c_data = $urandom;
      a_addr = ($urandom % 4 == 0) ? c_addr : 5'($urandom);
      b_addr = $urandom;
      #1;
      check(a_data == exp_rd(a_addr), $sformatf("A r%0d = %h expected %h", a_addr, a_data, exp_rd(a_addr)));
      check(b_data == exp_rd(b_addr), $sformatf("B r%0d", b_addr));
      @(posedge clk); if (we && c_addr != 0) m[c_addr] = c_data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

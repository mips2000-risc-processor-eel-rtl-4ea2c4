// tb_data_mem: random byte-enable writes over a small address window and
// reads against a byte-lane model (default 4K-word size).
module tb_data_mem;
  logic clk = 0; logic [31:0] addr, wdata, rdata; logic [3:0] be;
  logic [31:0] m [16];
  always #5 clk = ~clk;
  data_mem dut (.*);
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
    be = 4'hF;
    for (int k = 0; k < 16; k++) begin addr = k * 4 + 32'h3000; wdata = 0; m[k] = 0; @(negedge clk); end
    repeat (3000) begin
      int w; w = $urandom % 16;
      addr = 32'h3000 + w * 4 + ($urandom % 4); be = $urandom; wdata = $urandom;
      #1 check(rdata == m[w], $sformatf("read %h = %h expected %h", addr, rdata, m[w]));
      @(negedge clk);
      for (int l = 0; l < 4; l++) if (be[l]) m[w][8*l +: 8] = wdata[8*l +: 8];
      be = 0; #1 check(rdata == m[w], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prog_mem: loads a small ROM image (default 4K-word size) through the
// load port and reads it back by byte address, including non-aligned
// addresses, which return the enclosing word.
module tb_prog_mem;
  logic clk = 0, load_we;
  logic [31:0] addr, instr, load_data;
  logic [11:0] load_addr;
  logic [31:0] img [4096];
  always #5 clk = ~clk;
  prog_mem dut (.*);
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
    load_we = 1;
    for (int k = 0; k < 4096; k++) begin
      img[k] = $urandom; load_addr = 12'(k); load_data = img[k]; @(negedge clk);
    end
    load_we = 0;
    repeat (2000) begin
      addr = $urandom; #1;
      check(instr == img[addr[13:2]], $sformatf("addr %h: %h expected %h", addr, instr, img[addr[13:2]]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

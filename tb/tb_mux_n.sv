// tb_mux_n: 3-input 32-bit and 4-input 5-bit instances; every select value.
module tb_mux_n;
  logic [2:0][31:0] d3; logic [1:0] s3; logic [31:0] y3;
  logic [3:0][4:0]  d4; logic [1:0] s4; logic [4:0]  y4;
  mux_n #(.WIDTH(32), .N(3)) u3 (.din(d3), .sel(s3), .dout(y3));
  mux_n #(.WIDTH(5),  .N(4)) u4 (.din(d4), .sel(s4), .dout(y4));
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
    repeat (500) begin
      for (int k = 0; k < 3; k++) d3[k] = $urandom;
      for (int k = 0; k < 4; k++) d4[k] = $urandom;
      s3 = $urandom; s4 = $urandom; #1;
      check(y3 == ((s3 == 3) ? d3[0] : d3[s3]), "mux3");
      check(y4 == d4[s4], "mux4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

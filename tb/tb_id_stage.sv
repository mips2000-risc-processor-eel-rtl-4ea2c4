// tb_id_stage: fills registers through the write-back port, then decodes
// random instructions: register values A and B, the extended immediate, the
// pass-through of a same-cycle write, and the load-use stall.
module tb_id_stage;
  import mips_pkg::*;
  logic clk = 0, rst, wb_we, stall;
  logic [4:0] wb_addr; logic [31:0] wb_data, id_ex_instr;
  if_id_t if_id; id_ex_t id_out;
  logic [31:0] m [32];
  always #5 clk = ~clk;
  id_stage dut (.*);
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
    rst = 1; wb_we = 0; wb_addr = 0; wb_data = 0; if_id = '0; id_ex_instr = 0;
    @(negedge clk); rst = 0;
    m[0] = 0;
    for (int r = 1; r < 32; r++) begin
      wb_we = 1; wb_addr = 5'(r); m[r] = $urandom; wb_data = m[r]; @(negedge clk);
    end
    repeat (2000) begin
      logic [31:0] i, e_imm, e_a; logic [5:0] op; logic e_st;
      i = $urandom; op = i[31:26];
      if_id.instr = i; if_id.pc_plus4 = $urandom;
      id_ex_instr = $urandom;
      if ($urandom % 3 == 0) id_ex_instr[20:16] = i[25:21];
      wb_we = $urandom % 2; wb_addr = i[25:21]; wb_data = $urandom;
      #1;
      e_imm = (op inside {6'h0C, 6'h0D, 6'h0E}) ? {16'h0, i[15:0]} : {{16{i[15]}}, i[15:0]};
      e_a = (i[25:21] == 0) ? 0 : (wb_we ? wb_data : m[i[25:21]]);
      e_st = (id_ex_instr[31:26] >= 6'h20 && id_ex_instr[31:26] <= 6'h26) &&
             (id_ex_instr[20:16] == i[25:21] || id_ex_instr[20:16] == i[20:16]);
      check(id_out.a == e_a, "A");
      check(id_out.b == ((i[20:16] == 0) ? 0 : (wb_we && wb_addr == i[20:16]) ? wb_data : m[i[20:16]]), "B");
      check(id_out.imm == e_imm && id_out.instr == i && id_out.pc_plus4 == if_id.pc_plus4, "imm/instr/pc");
      check(stall == e_st, "stall");
      @(negedge clk);
      if (wb_we && wb_addr != 0) m[wb_addr] = wb_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

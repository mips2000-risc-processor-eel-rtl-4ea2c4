// tb_mips2000: the pipelined core on its own, at its default size. Runs the
// five test programs (a no-hazard test with NOPs, a store test, a hazard
// test, a bubble sort and an instruction-set sweep) and checks every
// register write-back in order, final registers and data memory against the
// reference model, and the cycle at which the final jump reaches MEM
// (instructions + load-use stalls + 3 x taken transfers + 3).
module tb_mips2000;
  import mips_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, pm_load_we, dm_load_we;
  logic [11:0] load_addr;
  logic [31:0] load_data;
  logic [31:0] dbg_pc, dbg_wb_data;
  logic        dbg_wb_we, dbg_stall, dbg_flush;
  logic [4:0]  dbg_wb_addr;
  logic [1:0]  dbg_fwd_a, dbg_fwd_b;

  mips2000 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_fwd_a_mem, n_fwd_a_wb, n_fwd_b_mem, n_fwd_b_wb, n_stall, n_rf_pass;
  int n_flush_br, n_flush_j, n_flush_reg, n_byte_store;
  always @(posedge clk) if (!rst) begin
    logic [31:0] idi;
    idi = dut.if_id.instr;
    if (dbg_fwd_a == 2'b10) n_fwd_a_mem++;
    if (dbg_fwd_a == 2'b01) n_fwd_a_wb++;
    if (dbg_fwd_b == 2'b10) n_fwd_b_mem++;
    if (dbg_fwd_b == 2'b01) n_fwd_b_wb++;
    if (dbg_stall) n_stall++;
    if (dbg_wb_we && dbg_wb_addr != 0 && (dbg_wb_addr == idi[25:21] || dbg_wb_addr == idi[20:16])) n_rf_pass++;
    if (dbg_flush && dut.u_mem.sel == 2'd2) n_flush_br++;
    if (dbg_flush && dut.u_mem.sel == 2'd1) n_flush_j++;
    if (dbg_flush && dut.u_mem.sel == 2'd3) n_flush_reg++;
    if (dut.u_mem.be != 4'b0000 && dut.u_mem.be != 4'b1111) n_byte_store++;
  end

  // ---------------- write-back monitor ----------------
  int          exp_addr [$];
  logic [31:0] exp_data [$];
  bit          monitor_on = 0;
  always @(posedge clk) if (monitor_on && !rst && dbg_wb_we && dbg_wb_addr != 0) begin
    if (exp_addr.size() == 0) check(0, $sformatf("unexpected write r%0d=%h", dbg_wb_addr, dbg_wb_data));
    else begin
      int ea; logic [31:0] ed;
      ea = exp_addr.pop_front(); ed = exp_data.pop_front();
      check(ea == int'(dbg_wb_addr) && ed == dbg_wb_data,
            $sformatf("write-back r%0d=%h, expected r%0d=%h", dbg_wb_addr, dbg_wb_data, ea, ed));
    end
  end

  // ---------------- one program ----------------
  task automatic run_prog(input int which);
    logic [31:0] p [int], d [int];
    mips_iss iss;
    int cyc, expect_cyc, gfo;
    iss = new();
    build_prog(which, p, d);
    foreach (p[k]) iss.pmem[k] = p[k];
    foreach (d[k]) iss.dmem[k] = d[k];
    iss.run();
    check(iss.gfo_pc >= 0, "reference model reached the end");
    gfo = iss.gfo_pc;

    @(negedge clk);
    rst = 1'b1; monitor_on = 0;
    for (int k = 0; k < 4096; k++) begin
      pm_load_we = 1'b1; load_addr = 12'(k); load_data = p.exists(k) ? p[k] : 32'h0;
      @(negedge clk);
    end
    pm_load_we = 1'b0;
    for (int k = 0; k < 4096; k++) begin
      dm_load_we = 1'b1; load_addr = 12'(k); load_data = d.exists(k) ? d[k] : 32'h0;
      @(negedge clk);
    end
    dm_load_we = 1'b0;
    exp_addr = iss.wlog_addr; exp_data = iss.wlog_data;
    repeat (2) @(negedge clk);
    rst = 1'b0; monitor_on = 1;

    cyc = 0;
    while (!(dut.ex_mem.instr[31:26] == 6'h02 && dut.ex_mem.pc_plus4 == 32'(gfo + 4)) && cyc < 20000) begin
      @(negedge clk); cyc++;
    end
    expect_cyc = iss.n_instr + iss.n_stall + 3 * iss.n_transfer + 3;
    check(cyc == expect_cyc, $sformatf("%s: end reached MEM at cycle %0d, expected %0d (instr %0d stall %0d transfers %0d)",
          PROG_NAME[which], cyc, expect_cyc, iss.n_instr, iss.n_stall, iss.n_transfer));
    repeat (6) @(negedge clk);
    check(exp_addr.size() == 0, $sformatf("%s: %0d write-backs missing", PROG_NAME[which], exp_addr.size()));
    for (int r = 0; r < 32; r++)
      check(dut.u_id.u_rf.regs[r] == iss.regs[r], $sformatf("%s: r%0d = %h, expected %h",
            PROG_NAME[which], r, dut.u_id.u_rf.regs[r], iss.regs[r]));
    for (int w = 0; w < 4096; w++) begin
      logic [31:0] mw;
      mw = {dut.u_mem.u_dmem.ram3[w], dut.u_mem.u_dmem.ram2[w],
            dut.u_mem.u_dmem.ram1[w], dut.u_mem.u_dmem.ram0[w]};
      if (mw != iss.dmem[w]) check(0, $sformatf("%s: dmem[%h] = %h, expected %h", PROG_NAME[which], w * 4, mw, iss.dmem[w]));
    end
    check(1, "data memory compared");

    $display("%-12s instr=%0d stalls=%0d transfers=%0d cycles=%0d CPI=%0.2f",
             PROG_NAME[which], iss.n_instr, iss.n_stall, iss.n_transfer, cyc - 3,
             real'(cyc - 3) / iss.n_instr);
  endtask

  initial begin
    rst = 1'b1; pm_load_we = 0; dm_load_we = 0; load_addr = '0; load_data = '0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < NPROG; k++) run_prog(k);

    check(n_fwd_a_mem > 0, "forward A from EX/MEM never happened");
    check(n_fwd_a_wb  > 0, "forward A from MEM/WB never happened");
    check(n_fwd_b_mem > 0, "forward B from EX/MEM never happened");
    check(n_fwd_b_wb  > 0, "forward B from MEM/WB never happened");
    check(n_rf_pass   > 0, "register-file pass-through never happened");
    check(n_stall     > 0, "load-use stall never happened");
    check(n_flush_br  > 0, "branch flush never happened");
    check(n_flush_j   > 0, "jump flush never happened");
    check(n_flush_reg > 0, "register-jump flush never happened");
    check(n_byte_store > 0, "partial (byte-lane) store never happened");
    $display("mechanisms: fwdA mem=%0d wb=%0d fwdB mem=%0d wb=%0d rf-pass=%0d stall=%0d flush br=%0d j=%0d jr=%0d byte-store=%0d",
             n_fwd_a_mem, n_fwd_a_wb, n_fwd_b_mem, n_fwd_b_wb, n_rf_pass, n_stall, n_flush_br, n_flush_j,
             n_flush_reg, n_byte_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

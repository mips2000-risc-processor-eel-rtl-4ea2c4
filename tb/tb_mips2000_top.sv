// tb_mips2000_top: end-to-end test of the MIPS2000 core and the instruction
// cache at their default sizes (4K-word memories, 4-set cache).
//
// For each of five programs (a no-hazard test with NOPs, a store test, a
// hazard test, a bubble sort and an instruction-set sweep) it:
//  * loads program and data memory while rst is high,
//  * runs the reference model (mips_tb_pkg::mips_iss) on the same program,
//  * checks every register write-back of the core, in order, against the
//    model's write log, and the final registers and data memory,
//  * checks the cycle at which the final "go forever" jump reaches MEM:
//    instructions + load-use stalls + 3 x taken transfers + 3,
//  * replays the model's fetch-address trace through the instruction cache
//    (refill memory answering every cycle) and checks each word, the
//    hit/miss counters against a reference LFU model, and the 1-cycle hit /
//    5-cycle miss latency, and prints the fetch cost with a 4:1 main-memory
//    to cache speed ratio.
// Every mechanism (both forwarding paths on both operands, the register-file
// pass-through, load-use stall, flushes by branch, jump and register jump,
// byte-lane stores, cache hit, miss and LFU eviction) is counted; one that
// never happens counts as a failure.
module tb_mips2000_top;
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
  logic        ic_req, ic_ready, ic_hit, ic_mem_req, ic_mem_valid;
  logic [31:0] ic_addr, ic_instr, ic_mem_addr, ic_mem_rdata, ic_hit_count, ic_miss_count;

  mips2000_top dut (.*);

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
  int n_flush_br, n_flush_j, n_flush_reg, n_byte_store, n_ic_hit, n_ic_miss, n_ic_evict;
  always @(posedge clk) if (!rst) begin
    logic [31:0] idi;
    idi = dut.u_core.if_id.instr;
    if (dbg_fwd_a == 2'b10) n_fwd_a_mem++;
    if (dbg_fwd_a == 2'b01) n_fwd_a_wb++;
    if (dbg_fwd_b == 2'b10) n_fwd_b_mem++;
    if (dbg_fwd_b == 2'b01) n_fwd_b_wb++;
    if (dbg_stall) n_stall++;
    if (dbg_wb_we && dbg_wb_addr != 0 && (dbg_wb_addr == idi[25:21] || dbg_wb_addr == idi[20:16])) n_rf_pass++;
    if (dbg_flush && dut.u_core.u_mem.sel == 2'd2) n_flush_br++;
    if (dbg_flush && dut.u_core.u_mem.sel == 2'd1) n_flush_j++;
    if (dbg_flush && dut.u_core.u_mem.sel == 2'd3) n_flush_reg++;
    if (dut.u_core.u_mem.be != 4'b0000 && dut.u_core.u_mem.be != 4'b1111) n_byte_store++;
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

  // ---------------- refill memory for the cache ----------------
  mips_iss cur;
  assign ic_mem_valid = ic_mem_req;
  always_comb ic_mem_rdata = (cur != null) ? cur.fetch(int'(ic_mem_addr)) : 32'h0;

  // reference LFU model
  logic [25:0] m_tag [4][2];
  bit          m_val [4][2];
  int          m_frq [4][2];
  function automatic bit model_access(input logic [31:0] a, output bit evict);
    int s = a[5:4];
    evict = 0;
    for (int w = 0; w < 2; w++)
      if (m_val[s][w] && m_tag[s][w] == a[31:6]) begin m_frq[s][w]++; return 1; end
    begin
      int v;
      if (!m_val[s][0]) v = 0;
      else if (!m_val[s][1]) v = 1;
      else begin v = (m_frq[s][1] < m_frq[s][0]) ? 1 : 0; evict = 1; end
      m_val[s][v] = 1; m_tag[s][v] = a[31:6]; m_frq[s][v] = 1;
    end
    return 0;
  endfunction

  task automatic cache_replay(input mips_iss iss, output int hits, output int misses);
    int h0 = ic_hit_count, m0 = ic_miss_count;
    hits = 0; misses = 0;
    foreach (m_val[s, w]) begin m_val[s][w] = 0; m_frq[s][w] = 0; end
    foreach (iss.fetch_trace[i]) begin
      int lat; bit exp_hit, ev;
      exp_hit = model_access(iss.fetch_trace[i], ev);
      if (ev) n_ic_evict++;
      @(negedge clk);
      ic_req = 1'b1; ic_addr = iss.fetch_trace[i];
      lat = 0;
      #1;
      while (!ic_ready) begin @(negedge clk); #1; lat++; end
      check(ic_instr == iss.fetch(iss.fetch_trace[i]), $sformatf("cache word at %h", ic_addr));
      check(ic_hit == exp_hit, $sformatf("cache hit flag at %h", ic_addr));
      check(lat == (exp_hit ? 0 : 5), $sformatf("cache latency %0d at %h", lat, ic_addr));
      if (exp_hit) begin hits++; n_ic_hit++; end else begin misses++; n_ic_miss++; end
      @(posedge clk); #1;
      ic_req = 1'b0;
    end
    @(negedge clk);
    check(int'(ic_hit_count) - h0 == hits && int'(ic_miss_count) - m0 == misses,
          $sformatf("cache counters %0d/%0d, expected %0d/%0d", ic_hit_count - h0, ic_miss_count - m0, hits, misses));
  endtask

  // ---------------- one program ----------------
  task automatic run_prog(input int which);
    logic [31:0] p [int], d [int];
    mips_iss iss;
    int cyc, expect_cyc, hits, misses, gfo;
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
    while (!(dut.u_core.ex_mem.instr[31:26] == 6'h02 && dut.u_core.ex_mem.pc_plus4 == 32'(gfo + 4)) && cyc < 20000) begin
      @(negedge clk); cyc++;
    end
    expect_cyc = iss.n_instr + iss.n_stall + 3 * iss.n_transfer + 3;
    check(cyc == expect_cyc, $sformatf("%s: end reached MEM at cycle %0d, expected %0d (instr %0d stall %0d transfers %0d)",
          PROG_NAME[which], cyc, expect_cyc, iss.n_instr, iss.n_stall, iss.n_transfer));
    repeat (6) @(negedge clk);
    check(exp_addr.size() == 0, $sformatf("%s: %0d write-backs missing", PROG_NAME[which], exp_addr.size()));
    for (int r = 0; r < 32; r++)
      check(dut.u_core.u_id.u_rf.regs[r] == iss.regs[r], $sformatf("%s: r%0d = %h, expected %h",
            PROG_NAME[which], r, dut.u_core.u_id.u_rf.regs[r], iss.regs[r]));
    for (int w = 0; w < 4096; w++) begin
      logic [31:0] mw;
      mw = {dut.u_core.u_mem.u_dmem.ram3[w], dut.u_core.u_mem.u_dmem.ram2[w],
            dut.u_core.u_mem.u_dmem.ram1[w], dut.u_core.u_mem.u_dmem.ram0[w]};
      if (mw != iss.dmem[w]) check(0, $sformatf("%s: dmem[%h] = %h, expected %h", PROG_NAME[which], w * 4, mw, iss.dmem[w]));
    end
    check(1, "data memory compared");

    cur = iss;
    cache_replay(iss, hits, misses);
    $display("%-12s instr=%0d stalls=%0d transfers=%0d cycles=%0d CPI=%0.2f icache hits=%0d misses=%0d hit rate=%0.1f%%",
             PROG_NAME[which], iss.n_instr, iss.n_stall, iss.n_transfer, cyc - 3,
             real'(cyc - 3) / iss.n_instr, hits, misses, 100.0 * hits / (hits + misses));
    // Fetch cost with main memory four times slower than the cache: a hit
    // costs 1, a miss 4; compared with a cache that always hits.
    $display("%-12s fetch cost (hit 1, miss 4) = %0d against %0d for a perfect cache, ratio %0.3f",
             PROG_NAME[which], hits + 4 * misses, hits + misses, real'(hits + 4 * misses) / (hits + misses));
  endtask

  initial begin
    rst = 1'b1; pm_load_we = 0; dm_load_we = 0; load_addr = '0; load_data = '0;
    ic_req = 0; ic_addr = '0; cur = null;
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
    check(n_ic_hit    > 0, "cache hit never happened");
    check(n_ic_miss   > 0, "cache miss never happened");
    check(n_ic_evict  > 0, "LFU eviction never happened");
    $display("mechanisms: fwdA mem=%0d wb=%0d fwdB mem=%0d wb=%0d rf-pass=%0d stall=%0d flush br=%0d j=%0d jr=%0d byte-store=%0d ic hit=%0d miss=%0d evict=%0d",
             n_fwd_a_mem, n_fwd_a_wb, n_fwd_b_mem, n_fwd_b_wb, n_rf_pass, n_stall, n_flush_br, n_flush_j,
             n_flush_reg, n_byte_store, n_ic_hit, n_ic_miss, n_ic_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_icache: random instruction-address streams (looping over a few lines
// so that sets fill up and lines are evicted) against a reference LFU model.
// Main memory answers with random gaps in mem_valid. Each access checks the
// returned word, the hit flag, the latency (0 cycles after the request for a
// hit; for a miss, one cycle to start, each refill cycle (mem_req high),
// and the response cycle), the refill addresses, and finally the hit/miss counters.
module tb_icache;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, req, ready, hit, mem_req, mem_valid;
  logic [31:0] addr, instr, mem_addr, mem_rdata, hit_count, miss_count;
  icache dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #5000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] memword(input logic [31:0] a); return {a[31:2], 2'b00} ^ 32'h5EED_0000; endfunction

  // main memory: random gaps
  int n_valid_cycles;
  logic [1:0] expect_word;
  always_comb mem_rdata = memword(mem_addr);
  always @(negedge clk) mem_valid = mem_req && ($urandom % 3 != 0);

  logic [25:0] m_tag [4][2];
  bit          m_val [4][2];
  int          m_frq [4][2];
  int          n_evict = 0;
  function automatic bit model_access(input logic [31:0] a);
    int s = a[5:4];
    for (int w = 0; w < 2; w++)
      if (m_val[s][w] && m_tag[s][w] == a[31:6]) begin m_frq[s][w]++; return 1; end
    begin
      int v;
      if (!m_val[s][0]) v = 0;
      else if (!m_val[s][1]) v = 1;
      else begin v = (m_frq[s][1] < m_frq[s][0]) ? 1 : 0; n_evict++; end
      m_val[s][v] = 1; m_tag[s][v] = a[31:6]; m_frq[s][v] = 1;
    end
    return 0;
  endfunction

  int hits = 0, misses = 0;
  task automatic access(input logic [31:0] a);
    bit eh; int lat, nv, nf, next_word;
    eh = model_access(a);
    @(negedge clk);
    req = 1; addr = a; lat = 0; nv = 0; nf = 0; next_word = 0;
    #1;
    while (!ready) begin
      @(posedge clk);
      if (mem_req) nf++;
      if (mem_req && mem_valid) begin
        check(mem_addr == {a[31:4], 2'(next_word), 2'b00}, $sformatf("refill address %h", mem_addr));
        next_word++; nv++;
      end
      @(negedge clk); #1; lat++;
    end
    check(instr == memword(a), $sformatf("word at %h: %h", a, instr));
    check(hit == eh, $sformatf("hit flag at %h", a));
    if (eh) check(lat == 0, "hit latency");
    else    check(nv == 4 && lat == nf + 1, $sformatf("miss: %0d words, %0d fill cycles, %0d cycles", nv, nf, lat));
    if (eh) hits++; else misses++;
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    rst = 1; req = 0; addr = 0;
    foreach (m_val[s, w]) begin m_val[s][w] = 0; m_frq[s][w] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    // directed: three lines in set 0, the middle one used more often
    access(32'h0000_0000); access(32'h0000_0004); access(32'h0000_0040); access(32'h0000_0044);
    access(32'h0000_0048); access(32'h0000_0080);   // evicts the line at 0x00 (count 2 < 3)
    access(32'h0000_0040);                           // still a hit
    access(32'h0000_0000);                           // miss again
    // random loops
    repeat (1500) begin
      logic [31:0] base; base = {20'h0, 6'($urandom % 24), 6'h0} + (($urandom % 2) ? 32'h0010_0000 : 0);
      repeat (1 + $urandom % 6) access(base + 4 * ($urandom % 16));
    end
    @(negedge clk);
    check(hit_count == hits && miss_count == misses, $sformatf("counters %0d/%0d expected %0d/%0d", hit_count, miss_count, hits, misses));
    check(n_evict > 10, "evictions exercised");
    $display("hits=%0d misses=%0d evictions=%0d", hits, misses, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

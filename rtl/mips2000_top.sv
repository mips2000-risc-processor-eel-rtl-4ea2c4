// mips2000_top: the MIPS2000 pipelined core and, beside it, the two-way LFU
// instruction cache with its main-memory refill port.
//
// The core runs from its own program memory (filled through the load port
// while rst is high) and exposes its debug signals. The cache is not in the
// core's fetch path: it is a separate unit with its own request and refill
// ports, used to study instruction-fetch hit rates. Both share clk and rst.
module mips2000_top
  import mips_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  // core: memory loading and debug
  input  logic          pm_load_we,
  input  logic          dm_load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data,
  output logic [31:0]   dbg_pc,
  output logic          dbg_wb_we,
  output logic [4:0]    dbg_wb_addr,
  output logic [31:0]   dbg_wb_data,
  output logic          dbg_stall,
  output logic          dbg_flush,
  output logic [1:0]    dbg_fwd_a,
  output logic [1:0]    dbg_fwd_b,
  // instruction cache
  input  logic          ic_req,
  input  logic [31:0]   ic_addr,
  output logic          ic_ready,
  output logic          ic_hit,
  output logic [31:0]   ic_instr,
  output logic          ic_mem_req,
  output logic [31:0]   ic_mem_addr,
  input  logic          ic_mem_valid,
  input  logic [31:0]   ic_mem_rdata,
  output logic [31:0]   ic_hit_count,
  output logic [31:0]   ic_miss_count
);
  mips2000 #(.AW(AW)) u_core (
    .clk, .rst, .pm_load_we, .dm_load_we, .load_addr, .load_data,
    .dbg_pc, .dbg_wb_we, .dbg_wb_addr, .dbg_wb_data, .dbg_stall, .dbg_flush,
    .dbg_fwd_a, .dbg_fwd_b);

  icache u_icache (
    .clk, .rst, .req(ic_req), .addr(ic_addr), .ready(ic_ready), .hit(ic_hit), .instr(ic_instr),
    .mem_req(ic_mem_req), .mem_addr(ic_mem_addr), .mem_valid(ic_mem_valid), .mem_rdata(ic_mem_rdata),
    .hit_count(ic_hit_count), .miss_count(ic_miss_count));
endmodule

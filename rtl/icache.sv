// icache: two-way set-associative instruction cache with least-frequently-
// used (LFU) replacement.
//
// Organisation (defaults): SETS = 4 sets x 2 ways, lines of WORDS = 4 words,
// 128 bytes of instructions. A byte address splits into byte offset [1:0],
// word index [3:2], set index [5:4] and a 26-bit tag [31:6]. Each way keeps a
// valid bit, its tag and an access count.
//
// Protocol: the requester raises req with addr and holds both until ready.
//  * Hit (valid way with equal tag, checked combinationally in IDLE): ready
//    and hit are high in the same cycle, instr is the word, the way's count
//    goes up by one (saturating) and the hit counter increments.
//  * Miss: the miss counter increments and the whole 4-word line is fetched
//    from main memory, one word per cycle in which mem_valid is high, while
//    mem_req is high and mem_addr names the word wanted. The line replaces an
//    invalid way if there is one, else the way with the smaller count (way 0
//    on a tie), and gets a count of 1. The cycle after the last word, ready
//    is high with the requested word (hit low).
// The organisation, the tag/set/word split, LFU replacement and "new line
// counts 1" follow the document; the refill handshake, tie rule and counter
// width are this design's choices. rst (synchronous) invalidates all lines
// and zeroes the counters.
module icache #(
  parameter int SETS   = 4,
  parameter int WORDS  = 4,
  parameter int FREQ_W = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        ready,
  output logic        hit,
  output logic [31:0] instr,
  output logic        mem_req,
  output logic [31:0] mem_addr,
  input  logic        mem_valid,
  input  logic [31:0] mem_rdata,
  output logic [31:0] hit_count,
  output logic [31:0] miss_count
);
  localparam int WB = $clog2(WORDS);
  localparam int SB = $clog2(SETS);
  localparam int TB = 32 - 2 - WB - SB;

  typedef enum logic [1:0] { S_IDLE, S_FILL, S_RESP } state_e;

  logic [31:0]       data  [SETS][2][WORDS];
  logic [TB-1:0]     tag   [SETS][2];
  logic              valid [SETS][2];
  logic [FREQ_W-1:0] freq  [SETS][2];

  state_e         state;
  logic           victim;
  logic [WB-1:0]  fill_cnt;

  logic [WB-1:0]  a_word;
  logic [SB-1:0]  a_set;
  logic [TB-1:0]  a_tag;
  assign a_word = addr[2 +: WB];
  assign a_set  = addr[2+WB +: SB];
  assign a_tag  = addr[31 -: TB];

  logic hit0, hit1, lookup_hit, way_hit, pick;
  assign hit0       = valid[a_set][0] && tag[a_set][0] == a_tag;
  assign hit1       = valid[a_set][1] && tag[a_set][1] == a_tag;
  assign lookup_hit = hit0 || hit1;
  assign way_hit    = hit1;

  // LFU victim choice for the requested set
  always_comb begin
    if (!valid[a_set][0])      pick = 1'b0;
    else if (!valid[a_set][1]) pick = 1'b1;
    else                       pick = (freq[a_set][1] < freq[a_set][0]);
  end

  assign hit      = (state == S_IDLE) && req && lookup_hit;
  assign ready    = hit || (state == S_RESP);
  assign instr    = (state == S_RESP) ? data[a_set][victim][a_word] : data[a_set][way_hit][a_word];
  assign mem_req  = (state == S_FILL);
  assign mem_addr = {a_tag, a_set, fill_cnt, 2'b00};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      victim     <= 1'b0;
      fill_cnt   <= '0;
      hit_count  <= '0;
      miss_count <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < 2; w++) begin
          valid[s][w] <= 1'b0;
          freq[s][w]  <= '0;
          tag[s][w]   <= '0;
        end
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          if (lookup_hit) begin
            hit_count <= hit_count + 1;
            if (freq[a_set][way_hit] != '1) freq[a_set][way_hit] <= freq[a_set][way_hit] + 1'b1;
          end else begin
            miss_count        <= miss_count + 1;
            victim            <= pick;
            fill_cnt          <= '0;
            valid[a_set][pick] <= 1'b0;
            state             <= S_FILL;
          end
        end
        S_FILL: if (mem_valid) begin
          data[a_set][victim][fill_cnt] <= mem_rdata;
          fill_cnt <= fill_cnt + 1'b1;
          if (fill_cnt == WB'(WORDS - 1)) begin
            valid[a_set][victim] <= 1'b1;
            tag[a_set][victim]   <= a_tag;
            freq[a_set][victim]  <= FREQ_W'(1);
            state                <= S_RESP;
          end
        end
        default: state <= S_IDLE;   // S_RESP
      endcase
    end
  end
endmodule

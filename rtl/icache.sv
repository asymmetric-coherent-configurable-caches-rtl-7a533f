// icache: PolyBlaze configurable L1 instruction cache.
//
// A read-only cache with the same structure as the data cache: data and tag
// banks, a separate valid-bit bank, a replacement-policy module (LRU, with
// direct-mapped as the one-way case), profiler strobes and optional debug
// counters. Size, line length and associativity are parameters so that cores
// can differ. Instruction caches are not kept coherent by hardware (software
// does it with WIC), so there is no invalidation link and no conditional path;
// the link to the L1 Arbiter is a request queue carrying only a 32-bit address
// and a data queue returning the line one word at a time, in order.
//
// Fetch addresses may be physical or virtual. Each tag therefore holds, beside
// the address bits above the set index, a virtual/physical bit and the
// process ID of a virtual line (zero for a physical line), and a hit needs all
// three to match, so lines of different processes or address types never
// alias. Set index and word offset come from the fetch address; the miss
// request carries the translated address (paddr) for a virtual fetch and the
// fetch address itself for a physical one.
//
// Operation: in S_IDLE a hit is answered in the request cycle; a WIC
// invalidates every way of the addressed set, ignoring the tag. A miss pushes
// the fetch address, collects LINE_WORDS words into the victim way, writes the
// tag and valid bit, and answers in the cycle after the last word.
//
// Processor interface (mb_ireq_t / mb_iresp_t): req with addr, virt, pid and
// paddr (or wic) is held until ack; data is valid with ack.
//
// From the document: the block structure, request/data queues, in-order line
// words, WIC ignoring the tag. This design's choices: the timing, same-cycle
// hits from LUT-style arrays, WIC clearing all ways of the set. The document
// says the instruction cache must track the process ID and the address type
// and must compare the whole address; the tag layout above, the 8-bit process
// ID, the zero ID for physical lines and the translated address arriving with
// the request (from the MMU, outside this block) are this design's choices.
module icache
  import pb_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned LINE_WORDS  = 4,
  parameter int unsigned WAYS        = 4,
  parameter bit          USE_DEBUG   = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mb_ireq_t    cpu_req,
  output mb_iresp_t   cpu_resp,
  // request link (to L1 Arbiter): address only
  output logic        req_wr_en,
  output logic [31:0] req_wr_data,
  input  logic        req_full,
  // data link (from L1 Arbiter)
  output logic        data_rd_en,
  input  logic [31:0] data_rd_data,
  input  logic        data_empty,
  output ic_events_t  events,
  output cache_dbg_t  dbg
);
  localparam int unsigned SETS  = CACHE_BYTES / (4 * LINE_WORDS * WAYS);
  localparam int unsigned WOFF  = $clog2(LINE_WORDS);
  localparam int unsigned SW    = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned AT_W  = 32 - 2 - WOFF - SW;   // address part of a tag
  localparam int unsigned TAG_W = 1 + PID_W + AT_W;       // {virt, pid, address}

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_FILL, S_RESP} state_t;
  state_t state;

  logic [SW-1:0]    cpu_set;
  logic [WOFF-1:0]  cpu_word;
  logic [TAG_W-1:0] cpu_tag;
  assign cpu_word = cpu_req.addr[2 +: WOFF];
  assign cpu_set  = cpu_req.addr[2 + WOFF +: SW];
  assign cpu_tag  = {cpu_req.virt, cpu_req.virt ? cpu_req.pid : PID_W'(0),
                     cpu_req.addr[31 -: AT_W]};

  logic [WAYS-1:0][TAG_W-1:0] tags_a, tags_unused;
  logic [WAYS-1:0]            valid_a, valid_unused;
  logic [WAYS-1:0][31:0]      words;
  logic [WW-1:0]              fill_way, victim, hit_way;
  logic [WOFF-1:0]            fill_cnt;
  logic [31:0]                fill_word_q;
  logic [WAYS-1:0]            fill_way_oh, hit_vec;
  logic                       hit, fill_pop, fill_last, wic;

  always_comb begin
    fill_way_oh = '0;
    fill_way_oh[fill_way] = 1'b1;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = valid_a[w] && (tags_a[w] == cpu_tag);
      if (hit_vec[w]) hit_way = WW'(w);
    end
    hit = |hit_vec;
  end

  assign fill_pop  = (state == S_FILL) && !data_empty;
  assign fill_last = fill_pop && (fill_cnt == WOFF'(LINE_WORDS - 1));
  assign wic       = (state == S_IDLE) && cpu_req.req && cpu_req.wic;

  tag_bank #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rd_a_set(cpu_set), .rd_a_tags(tags_a), .rd_b_set(cpu_set), .rd_b_tags(tags_unused),
    .we(fill_last), .wr_set(cpu_set), .wr_way(fill_way), .wr_tag(cpu_tag));

  valid_bits #(.SETS(SETS), .WAYS(WAYS)) u_valid (
    .clk, .rst_n, .rd_a_set(cpu_set), .rd_a_valid(valid_a), .rd_b_set(cpu_set), .rd_b_valid(valid_unused),
    .set_en(fill_last), .set_set(cpu_set), .set_way_oh(fill_way_oh),
    .clr_a_en(wic), .clr_a_set(cpu_set), .clr_a_mask('1),
    .clr_b_en(1'b0), .clr_b_set(cpu_set), .clr_b_mask('0));

  data_bank #(.SETS(SETS), .WAYS(WAYS), .LINE_WORDS(LINE_WORDS)) u_data (
    .clk, .rd_addr({cpu_set, cpu_word}), .rd_words(words),
    .we(fill_pop), .wr_way(fill_way), .wr_addr({cpu_set, fill_cnt}), .wr_be(4'hF),
    .wr_data(data_rd_data));

  logic fetch, fetch_hit;
  assign fetch     = (state == S_IDLE) && cpu_req.req && !cpu_req.wic;
  assign fetch_hit = fetch && hit;

  lru_policy #(.SETS(SETS), .WAYS(WAYS)) u_repl (
    .clk, .rst_n, .lookup_set(cpu_set), .lookup_valid(valid_a), .victim(victim),
    .touch_en(fetch_hit || fill_last), .touch_set(cpu_set),
    .touch_way(fill_last ? fill_way : hit_way));

  always_comb begin
    cpu_resp       = '0;
    events         = '0;
    events.rd_req  = fetch;
    events.rd_hit  = fetch_hit;
    events.rd_miss = fetch && !hit;
    if (wic || fetch_hit) begin
      cpu_resp.ack  = 1'b1;
      cpu_resp.data = words[hit_way];
    end else if (state == S_RESP) begin
      cpu_resp.ack  = 1'b1;
      cpu_resp.data = fill_word_q;
    end
  end

  assign req_wr_en   = (state == S_REQ) && !req_full;
  assign req_wr_data = cpu_req.virt ? cpu_req.paddr : cpu_req.addr;
  assign data_rd_en  = fill_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      fill_way    <= '0;
      fill_cnt    <= '0;
      fill_word_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (fetch && !hit) begin
          state    <= S_REQ;
          fill_way <= victim;
        end
        S_REQ: if (!req_full) begin
          state    <= S_FILL;
          fill_cnt <= '0;
        end
        S_FILL: if (fill_pop) begin
          if (fill_cnt == cpu_word) fill_word_q <= data_rd_data;
          fill_cnt <= fill_cnt + WOFF'(1);
          if (fill_last) state <= S_RESP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  cache_debug #(.USE_DEBUG(USE_DEBUG)) u_dbg (
    .clk, .rst_n, .miss_start(req_wr_en), .fill_valid(fill_pop),
    .fill_first(fill_pop && fill_cnt == '0), .fill_word(data_rd_data), .dbg);

  a_hold_req: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> cpu_req.req)
    else $error("icache: request dropped before ack");

endmodule

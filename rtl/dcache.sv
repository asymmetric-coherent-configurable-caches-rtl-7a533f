// dcache: PolyBlaze coherent, configurable L1 data cache.
//
// A write-through, no-write-allocate data cache whose size, line length and
// associativity are parameters, so that every core of a multicore system can
// have a differently shaped cache (an asymmetric system). Beyond a plain
// MicroBlaze data cache it contains:
//   * a separate valid-bit bank and a replacement-policy module (LRU, with
//     direct-mapped as the one-way case);
//   * a coherency protocol handler for a write-invalidate protocol: it takes
//     invalidation addresses broadcast by the L2 Arbiter and clears the line
//     whose tag matches;
//   * conditional operations: an LWX always misses (a present line is
//     invalidated first) so that its request reaches the lock arbiter; an SWX
//     is sent as a conditional write and the cache waits for its one-bit
//     result, updating a present line only when the store succeeded;
//   * profiler strobes (the ABACUS interface) and optional debug counters.
//
// Operation. In S_IDLE a read hit, a store, or a WDC invalidate is answered in
// the same cycle (ack is combinational from the request and the arrays). A
// read miss pushes one request packet with the full address, then takes the
// LINE_WORDS words of the line from the data link, first word of the line
// first, writes them into the victim way, writes the tag, sets the valid bit
// and answers in the cycle after the last word. Stores are written through as
// one request packet each; a store that hits also updates the cached word.
// WDC invalidates every way of the addressed set, ignoring the tag.
// Coherency packets are consumed only in S_IDLE, one per cycle, so a line fill
// is never interleaved with an invalidation of the line being filled. A
// waiting packet goes before the processor's request (which then waits a
// cycle), so no hit returns a word whose invalidation has already arrived.
//
// Processor interface (mb_dreq_t / mb_dresp_t): the processor raises req with
// we, cond, wdc, addr, wdata, be and holds them until ack; rdata and cond_ok
// are valid with ack. Link interfaces are the write side of the request link
// and the show-ahead read sides of the data, invalidation and conditional-
// result links (see pbml_fifo).
//
// From the document: the blocks listed above, the packet formats, forced miss
// on LWX, conditional result handling, WDC ignoring the tag, in-order line
// words. This design's choices: write-through/no-allocate (the document
// describes its caches as write-through without naming the allocation rule),
// LUT-style arrays with same-cycle hits, the state machine and its timing,
// and WDC clearing all ways of a set.
module dcache
  import pb_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned LINE_WORDS  = 4,
  parameter int unsigned WAYS        = 4,
  parameter bit          USE_DEBUG   = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  mb_dreq_t    cpu_req,
  output mb_dresp_t   cpu_resp,
  // request link (to L1 Arbiter)
  output logic        req_wr_en,
  output dreq_pkt_t   req_wr_data,
  input  logic        req_full,
  // data link (from L1 Arbiter)
  output logic        data_rd_en,
  input  logic [31:0] data_rd_data,
  input  logic        data_empty,
  // invalidation link (from L1 Arbiter)
  output logic        inv_rd_en,
  input  logic [31:0] inv_rd_data,
  input  logic        inv_empty,
  // conditional-result link (from L1 Arbiter)
  output logic        cond_rd_en,
  input  logic        cond_rd_data,
  input  logic        cond_empty,
  // profiler and debug
  output dc_events_t  events,
  output cache_dbg_t  dbg
);
  localparam int unsigned SETS  = CACHE_BYTES / (4 * LINE_WORDS * WAYS);
  localparam int unsigned WOFF  = $clog2(LINE_WORDS);
  localparam int unsigned SW    = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = 32 - 2 - WOFF - SW;
  localparam int unsigned DAW   = $clog2(SETS * LINE_WORDS);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_FILL, S_RESP, S_SWX} state_t;
  state_t state;

  // ------------------------------------------------------------ address split
  logic [SW-1:0]    cpu_set, inv_set;
  logic [WOFF-1:0]  cpu_word;
  logic [TAG_W-1:0] cpu_tag, inv_tag;
  assign cpu_word = cpu_req.addr[2 +: WOFF];
  assign cpu_set  = cpu_req.addr[2 + WOFF +: SW];
  assign cpu_tag  = cpu_req.addr[31 -: TAG_W];
  assign inv_set  = inv_rd_data[2 + WOFF +: SW];
  assign inv_tag  = inv_rd_data[31 -: TAG_W];

  // ------------------------------------------------------------ storage
  logic [WAYS-1:0][TAG_W-1:0] tags_a, tags_b;
  logic [WAYS-1:0]            valid_a, valid_b;
  logic [WAYS-1:0][31:0]      words;
  logic                       tag_we;
  logic                       db_we;
  logic [WW-1:0]              db_way;
  logic [DAW-1:0]             db_waddr;
  logic [3:0]                 db_be;
  logic [31:0]                db_wdata;
  logic                       v_set, v_clr_a, v_clr_b;
  logic [WAYS-1:0]            v_clr_a_mask, v_clr_b_mask;
  logic                       touch;
  logic [WW-1:0]              touch_way, victim;

  logic [WW-1:0]    fill_way;
  logic [WOFF-1:0]  fill_cnt;
  logic [31:0]      fill_word_q;
  logic [WAYS-1:0]  fill_way_oh;

  always_comb begin
    fill_way_oh = '0;
    fill_way_oh[fill_way] = 1'b1;
  end

  tag_bank #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rd_a_set(cpu_set), .rd_a_tags(tags_a), .rd_b_set(inv_set), .rd_b_tags(tags_b),
    .we(tag_we), .wr_set(cpu_set), .wr_way(fill_way), .wr_tag(cpu_tag));

  valid_bits #(.SETS(SETS), .WAYS(WAYS)) u_valid (
    .clk, .rst_n, .rd_a_set(cpu_set), .rd_a_valid(valid_a), .rd_b_set(inv_set), .rd_b_valid(valid_b),
    .set_en(v_set), .set_set(cpu_set), .set_way_oh(fill_way_oh),
    .clr_a_en(v_clr_a), .clr_a_set(cpu_set), .clr_a_mask(v_clr_a_mask),
    .clr_b_en(v_clr_b), .clr_b_set(inv_set), .clr_b_mask(v_clr_b_mask));

  data_bank #(.SETS(SETS), .WAYS(WAYS), .LINE_WORDS(LINE_WORDS)) u_data (
    .clk, .rd_addr({cpu_set, cpu_word}), .rd_words(words),
    .we(db_we), .wr_way(db_way), .wr_addr(db_waddr), .wr_be(db_be), .wr_data(db_wdata));

  lru_policy #(.SETS(SETS), .WAYS(WAYS)) u_repl (
    .clk, .rst_n, .lookup_set(cpu_set), .lookup_valid(valid_a), .victim(victim),
    .touch_en(touch), .touch_set(cpu_set), .touch_way(touch_way));

  // ------------------------------------------------------------ hit detection
  logic [WAYS-1:0] hit_vec, inv_hit_vec;
  logic            hit;
  logic [WW-1:0]   hit_way;
  always_comb begin
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w]     = valid_a[w] && (tags_a[w] == cpu_tag);
      inv_hit_vec[w] = valid_b[w] && (tags_b[w] == inv_tag);
      if (hit_vec[w]) hit_way = WW'(w);
    end
    hit = |hit_vec;
  end

  // ------------------------------------------------------------ control logic
  logic is_read, is_write;
  assign is_read  = cpu_req.req && !cpu_req.wdc && !cpu_req.we;
  assign is_write = cpu_req.req && !cpu_req.wdc &&  cpu_req.we;

  logic miss_start, fill_pop;
  assign fill_pop = (state == S_FILL) && !data_empty;

  always_comb begin
    cpu_resp     = '0;
    req_wr_en    = 1'b0;
    req_wr_data  = '{addr: cpu_req.addr, rnw: 1'b0, wdata: cpu_req.wdata, be: cpu_req.be,
                     cond: cpu_req.cond};
    data_rd_en   = 1'b0;
    inv_rd_en    = 1'b0;
    cond_rd_en   = 1'b0;
    tag_we       = 1'b0;
    db_we        = 1'b0;
    db_way       = hit_way;
    db_waddr     = {cpu_set, cpu_word};
    db_be        = cpu_req.be;
    db_wdata     = cpu_req.wdata;
    v_set        = 1'b0;
    v_clr_a      = 1'b0;
    v_clr_a_mask = '0;
    v_clr_b      = 1'b0;
    v_clr_b_mask = inv_hit_vec;
    touch        = 1'b0;
    touch_way    = hit_way;
    miss_start   = 1'b0;
    events       = '0;

    case (state)
      S_IDLE: begin
        // coherency protocol handler
        if (!inv_empty) begin
          inv_rd_en      = 1'b1;
          v_clr_b        = |inv_hit_vec;
          events.inv_pkt = 1'b1;
          events.inv_hit = |inv_hit_vec;
        end else if (cpu_req.req && cpu_req.wdc) begin
          v_clr_a      = 1'b1;
          v_clr_a_mask = '1;
          cpu_resp.ack = 1'b1;
        end else if (is_read) begin
          events.rd_req = 1'b1;
          if (hit && !cpu_req.cond) begin
            events.rd_hit  = 1'b1;
            cpu_resp.ack   = 1'b1;
            cpu_resp.rdata = words[hit_way];
            touch          = 1'b1;
          end else begin
            events.rd_miss = 1'b1;
            // forced miss of an LWX: drop the present copy first
            v_clr_a      = cpu_req.cond && hit;
            v_clr_a_mask = hit_vec;
          end
        end else if (is_write && !req_full) begin
          req_wr_en      = 1'b1;
          events.wr_req  = 1'b1;
          events.wr_hit  = hit;
          events.wr_miss = !hit;
          if (!cpu_req.cond) begin
            cpu_resp.ack = 1'b1;
            db_we        = hit;
            touch        = hit;
          end
        end
      end
      S_REQ: begin
        if (!req_full) begin
          req_wr_en       = 1'b1;
          req_wr_data.rnw = 1'b1;
          miss_start      = 1'b1;
        end
      end
      S_FILL: begin
        data_rd_en = fill_pop;
        db_we      = fill_pop;
        db_way     = fill_way;
        db_waddr   = {cpu_set, fill_cnt};
        db_be      = 4'hF;
        db_wdata   = data_rd_data;
        if (fill_pop && fill_cnt == WOFF'(LINE_WORDS - 1)) begin
          tag_we    = 1'b1;
          v_set     = 1'b1;
          touch     = 1'b1;
          touch_way = fill_way;
        end
      end
      S_RESP: begin
        cpu_resp.ack   = 1'b1;
        cpu_resp.rdata = fill_word_q;
      end
      S_SWX: begin
        if (!cond_empty) begin
          cond_rd_en       = 1'b1;
          cpu_resp.ack     = 1'b1;
          cpu_resp.cond_ok = cond_rd_data;
          db_we            = cond_rd_data && hit;
          touch            = cond_rd_data && hit;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      fill_way    <= '0;
      fill_cnt    <= '0;
      fill_word_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (inv_empty) begin
          if (is_read && !(hit && !cpu_req.cond)) begin
            state    <= S_REQ;
            fill_way <= (cpu_req.cond && hit) ? hit_way : victim;
          end else if (is_write && !req_full && cpu_req.cond) begin
            state <= S_SWX;
          end
        end
        S_REQ: if (!req_full) begin
          state    <= S_FILL;
          fill_cnt <= '0;
        end
        S_FILL: if (fill_pop) begin
          if (fill_cnt == cpu_word) fill_word_q <= data_rd_data;
          fill_cnt <= fill_cnt + WOFF'(1);
          if (fill_cnt == WOFF'(LINE_WORDS - 1)) state <= S_RESP;
        end
        S_RESP: state <= S_IDLE;
        S_SWX:  if (!cond_empty) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  cache_debug #(.USE_DEBUG(USE_DEBUG)) u_dbg (
    .clk, .rst_n, .miss_start, .fill_valid(fill_pop), .fill_first(fill_pop && fill_cnt == '0),
    .fill_word(data_rd_data), .dbg);

  // The processor must hold its request while the cache is working on it.
  a_hold_req: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> cpu_req.req)
    else $error("dcache: request dropped before ack");

endmodule

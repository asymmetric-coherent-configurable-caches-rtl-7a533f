// tb_dcache: self-checking test of the L1 data cache on its own.
//
// The testbench plays the L1 Arbiter side of the four links: it takes request
// packets, returns the line words (first word of the line first) after a
// fixed delay, applies write-through stores to its own memory, answers SWX
// with a chosen result, and injects invalidation addresses. Directed cases
// cover read miss and fill timing, same-cycle hits, write-through with and
// without a hit, coherency invalidation, LWX forced miss, SWX success and
// failure, WDC, and LRU eviction; a random phase then compares every load
// with the testbench memory. The cache is 1 kB, 4-way, 4-word lines.
module tb_dcache;
  import pb_pkg::*;
  localparam int LW = 4, WAYS = 4, BYTES = 1024;
  localparam int SETS = BYTES / (4 * LW * WAYS);   // 16
  localparam int FILL_DELAY = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  mb_dreq_t cpu_req;
  mb_dresp_t cpu_resp;
  logic req_wr_en, req_full, data_rd_en, data_empty, inv_rd_en, inv_empty;
  logic cond_rd_en, cond_rd_data, cond_empty;
  dreq_pkt_t req_wr_data;
  logic [31:0] data_rd_data, inv_rd_data;
  dc_events_t events;
  cache_dbg_t dbg;

  dcache #(.CACHE_BYTES(BYTES), .LINE_WORDS(LW), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ memory + links
  logic [31:0] mem [logic [29:0]];
  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : (a ^ 32'h5A5A_0000);
  endfunction

  typedef struct { logic [31:0] w; longint t; } tw_t;
  tw_t dq [$];
  logic inq [$];
  logic [31:0] ivq [$];
  dreq_pkt_t pkts [$];
  bit swx_result = 1'b1;
  bit full_random = 1'b0;
  longint cyc = 0;
  int n_read_pkts = 0;

  initial begin
    req_full = 1'b0; data_empty = 1'b1; data_rd_data = '0;
    inv_empty = 1'b1; inv_rd_data = '0; cond_empty = 1'b1; cond_rd_data = 1'b0;
  end

  always @(negedge clk) begin
    #4;  // sample what the cache will act on at the next rising edge
    if (req_wr_en && !req_full) begin
      pkts.push_back(req_wr_data);
      if (req_wr_data.rnw) begin
        logic [31:0] base;
        n_read_pkts++;
        base = {req_wr_data.addr[31:2+$clog2(LW)], {($clog2(LW)+2){1'b0}}};
        for (int i = 0; i < LW; i++) dq.push_back('{w: rd(base + 32'(4*i)), t: cyc + longint'(FILL_DELAY)});
      end else begin
        bit apply;
        apply = !req_wr_data.cond || swx_result;
        if (req_wr_data.cond) inq.push_back(swx_result);
        if (apply) begin
          logic [31:0] v;
          v = rd(req_wr_data.addr);
          for (int b = 0; b < 4; b++) if (req_wr_data.be[b]) v[8*b +: 8] = req_wr_data.wdata[8*b +: 8];
          mem[req_wr_data.addr[31:2]] = v;
        end
      end
    end
    if (data_rd_en && !data_empty) void'(dq.pop_front());
    if (inv_rd_en && !inv_empty)   void'(ivq.pop_front());
    if (cond_rd_en && !cond_empty) void'(inq.pop_front());
    @(posedge clk);
    #1;
    cyc++;
    data_empty   = !(dq.size() > 0 && dq[0].t <= cyc);
    data_rd_data = (dq.size() > 0) ? dq[0].w : '0;
    inv_empty    = ivq.size() == 0;
    inv_rd_data  = (ivq.size() > 0) ? ivq[0] : '0;
    cond_empty   = inq.size() == 0;
    cond_rd_data = (inq.size() > 0) ? inq[0] : 1'b0;
    req_full     = full_random && (($urandom % 4) == 0);
  end

  // ------------------------------------------------------------ processor side
  int last_wait;   // cycles the last operation waited before its ack
  task automatic cpu_op(input bit we, input bit cond, input bit wdc, input logic [31:0] a,
                        input logic [31:0] wd, input logic [3:0] be,
                        output logic [31:0] rdata, output bit ok);
    last_wait = 0;
    forever begin
      @(negedge clk);
      cpu_req = '{req: 1'b1, we: we, cond: cond, wdc: wdc, addr: a, wdata: wd, be: be};
      #4;
      if (cpu_resp.ack) begin
        rdata = cpu_resp.rdata; ok = cpu_resp.cond_ok;
        @(posedge clk); #1 cpu_req = '0;
        break;
      end
      last_wait++;
    end
  endtask

  logic [31:0] r; bit ok;
  task automatic load(input logic [31:0] a, output logic [31:0] d);
    cpu_op(1'b0, 1'b0, 1'b0, a, '0, '0, d, ok);
  endtask
  task automatic store(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    logic [31:0] x;
    cpu_op(1'b1, 1'b0, 1'b0, a, d, be, x, ok);
  endtask

  function automatic logic [31:0] set_addr(input int set, input int tag, input int word);
    return 32'((tag * SETS + set) * LW * 4 + word * 4);
  endfunction

  int n0;
  logic [31:0] A, B, v;
  initial begin
    cpu_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- read miss, fill, then hits
    A = 32'h0000_1238;
    n0 = n_read_pkts;
    load(A, r);
    check(r == rd(A), "miss returns memory word");
    check(n_read_pkts == n0 + 1, "one read packet for a miss");
    check(pkts[$].addr == A && pkts[$].rnw && !pkts[$].cond, "read packet fields");
    // request leaves at wait 1, words appear FILL_DELAY later, one per cycle,
    // ack in the cycle after the last word
    check(last_wait >= FILL_DELAY + LW, $sformatf("miss waited %0d cycles", last_wait));
    check(last_wait <= FILL_DELAY + LW + 3, $sformatf("miss waited %0d cycles", last_wait));
    load(A, r);
    check(r == rd(A) && last_wait == 0, "hit answered in the request cycle");
    load(A - 8, r);
    check(r == rd(A - 8) && last_wait == 0 && n_read_pkts == n0 + 1, "other word of line hits");

    // ---- write-through, hit updates cache
    store(A, 32'hCAFE_F00D, 4'b0011);
    check(!pkts[$].rnw && pkts[$].addr == A && pkts[$].be == 4'b0011 && pkts[$].wdata == 32'hCAFE_F00D,
          "store written through as one packet");
    load(A, r);
    check(r == rd(A) && last_wait == 0, "store hit merged bytes into cached word");
    check(r[15:0] == 16'hF00D, "low half from store");

    // ---- store miss does not allocate
    B = 32'h0000_4000;
    store(B, 32'h1111_2222, 4'hF);
    n0 = n_read_pkts;
    load(B, r);
    check(n_read_pkts == n0 + 1 && r == 32'h1111_2222, "store miss: no allocate, load fetches new data");

    // ---- coherency invalidation
    mem[A[31:2]] = 32'h0BAD_0BAD;           // another core writes A
    ivq.push_back(32'h0000_7770);           // address not cached: no effect
    ivq.push_back(A);
    repeat (6) @(posedge clk);
    n0 = n_read_pkts;
    load(A, r);
    check(r == 32'h0BAD_0BAD && n_read_pkts == n0 + 1, "invalidated line is refetched");
    load(B, r);
    check(last_wait == 0, "unrelated line survives invalidation");

    // ---- LWX forces a miss even when cached
    n0 = n_read_pkts;
    cpu_op(1'b0, 1'b1, 1'b0, A, '0, '0, r, ok);
    check(n_read_pkts == n0 + 1 && pkts[$].cond && pkts[$].rnw, "LWX sends conditional read");
    check(r == 32'h0BAD_0BAD, "LWX data");

    // ---- SWX success updates the cache, failure does not
    swx_result = 1'b1;
    cpu_op(1'b1, 1'b1, 1'b0, A, 32'h1234_5678, 4'hF, r, ok);
    check(ok && pkts[$].cond && !pkts[$].rnw, "SWX success reported");
    load(A, r);
    check(r == 32'h1234_5678 && last_wait == 0, "successful SWX updated cached word");
    swx_result = 1'b0;
    cpu_op(1'b1, 1'b1, 1'b0, A, 32'hDEAD_DEAD, 4'hF, r, ok);
    check(!ok, "SWX failure reported");
    load(A, r);
    check(r == 32'h1234_5678 && last_wait == 0, "failed SWX left cache unchanged");
    swx_result = 1'b1;

    // ---- WDC invalidates regardless of tag
    cpu_op(1'b0, 1'b0, 1'b1, A + 32'h0010_0000, '0, '0, r, ok);  // same set, other tag
    n0 = n_read_pkts;
    load(A, r);
    check(n_read_pkts == n0 + 1, "WDC invalidated the set");

    // ---- LRU: five lines of one set, touch order decides the victim
    for (int t = 0; t < 4; t++) load(set_addr(5, t + 1, 0), r);
    load(set_addr(5, 1, 0), r);     // line 1 becomes most recent; line 2 is LRU
    load(set_addr(5, 5, 0), r);     // evicts line 2
    n0 = n_read_pkts;
    load(set_addr(5, 1, 0), r); load(set_addr(5, 3, 0), r);
    load(set_addr(5, 4, 0), r); load(set_addr(5, 5, 0), r);
    check(n_read_pkts == n0, "recently used lines still present");
    load(set_addr(5, 2, 0), r);
    check(n_read_pkts == n0 + 1, "least recently used line was evicted");

    // ---- random traffic, with the request link sometimes full
    full_random = 1'b1;
    for (int i = 0; i < 600; i++) begin
      logic [31:0] a;
      a = 32'h0002_0000 + 32'(($urandom % 256) * 4);   // 1 kB region, 4x the cache
      case ($urandom % 4)
        0: begin store(a, $urandom, 4'($urandom)); end
        1: begin
          ivq.push_back(a);
          mem[a[31:2]] = $urandom;
          repeat (4) @(posedge clk);
        end
        default: begin load(a, r); check(r == rd(a), $sformatf("random load %h", a)); end
      endcase
    end
    full_random = 1'b0;
    check(dbg.miss_count == 32'(n_read_pkts), "debug request counter matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_polyblaze_mem_top: end-to-end test of the dual-core memory system at its
// default sizes (no parameter overrides): 16 kB 4-way instruction caches on
// both cores, a 4 kB 4-way data cache on core 0 and an 8 kB direct-mapped
// data cache on core 1, all with 4-word lines.
//
// The caches and arbiters run on one 80 MHz-like clock (period 20 time units)
// and the memory interface on a clock twice as fast, as in the system the
// design comes from. A behavioural memory controller (mpmc_model) serves the
// native port. The testbench drives each core's instruction and data ports
// the way a processor would (request held until ack) and keeps its own copy
// of memory to check every load and fetch against.
//
// Directed phases make each mechanism happen: instruction and data misses and
// hits, stride-1 prefetch hits, write-through stores that hit and miss, the
// write-invalidate broadcast dropping a line in the other core, LWX/SWX with
// success and with failure after the other core wrote the reserved word, WDC
// and WIC, virtual fetches of two processes at one virtual address, LRU
// replacement in the 4-way cache and conflict eviction in the
// direct-mapped one, and reads of both cores outstanding at memory together.
// A random phase then runs both cores at once. Every mechanism is counted and
// one that never happened counts as a failure. The best-case data-miss
// latency is measured in core cycles and checked against a bound.
module tb_polyblaze_mem_top;
  import pb_pkg::*;
  localparam int NC = 2;

  logic clk_core = 1'b0, clk_mem = 1'b0, rst_n = 1'b0;
  logic clk_arb;
  assign clk_arb = clk_core;
  always #10 clk_core = ~clk_core;
  always #5  clk_mem  = ~clk_mem;

  mb_dreq_t   [NC-1:0] dreq;
  mb_dresp_t  [NC-1:0] dresp;
  mb_ireq_t   [NC-1:0] ireq;
  mb_iresp_t  [NC-1:0] iresp;
  dc_events_t [NC-1:0] dc_events;
  ic_events_t [NC-1:0] ic_events;
  cache_dbg_t [NC-1:0] dc_dbg, ic_dbg;
  logic       [NC-1:0] pf_hit, pf_miss, resv_valid;
  logic npi_cmd_valid, npi_cmd_ready, npi_cmd_rnw, npi_rd_valid, npi_rd_last, npi_rd_ready;
  logic [31:0] npi_cmd_addr, npi_cmd_wdata, npi_rd_data;
  logic [3:0]  npi_cmd_nwords, npi_cmd_be;
  logic ev_inv_broadcast, ev_cond_fail;
  logic [2:0] reads_outstanding;

  polyblaze_mem_top dut (.*);
  mpmc_model #(.MEM_WORDS(65536), .LATENCY(24), .QDEPTH(4)) u_mem (.clk(clk_mem), .*);

  // per-core request variables, one process each
  mb_dreq_t dq_tb [NC];
  mb_ireq_t iq_tb [NC];
  for (genvar c = 0; c < NC; c++) begin : g_drv
    assign dreq[c] = dq_tb[c];
    assign ireq[c] = iq_tb[c];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ reference memory
  // Same start image as the memory model: word i holds (i * 0x00010001) ^ 0xC0DE0000.
  logic [31:0] gold [logic [29:0]];
  function automatic logic [31:0] gword(input logic [31:0] a);
    logic [29:0] i;
    i = a[31:2] & 30'hFFFF;
    return gold.exists(i) ? gold[i] : ((32'(i) * 32'h0001_0001) ^ 32'hC0DE_0000);
  endfunction
  function automatic void gwrite(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    logic [31:0] v;
    v = gword(a);
    for (int b = 0; b < 4; b++) if (be[b]) v[8*b +: 8] = d[8*b +: 8];
    gold[a[31:2] & 30'hFFFF] = v;
  endfunction

  // ------------------------------------------------------------ processor ports
  int d_wait [NC], i_wait [NC];
  task automatic d_op(input int c, input bit we, input bit cond, input bit wdc,
                      input logic [31:0] a, input logic [31:0] wd, input logic [3:0] be,
                      output logic [31:0] rdata, output bit ok);
    d_wait[c] = 0;
    forever begin
      @(negedge clk_core);
      dq_tb[c] = '{req: 1'b1, we: we, cond: cond, wdc: wdc, addr: a, wdata: wd, be: be};
      #4;
      if (dresp[c].ack) begin
        rdata = dresp[c].rdata; ok = dresp[c].cond_ok;
        @(posedge clk_core); #1 dq_tb[c] = '0;
        break;
      end
      d_wait[c]++;
      if (d_wait[c] > 2000) begin check(0, "data request never acknowledged"); break; end
    end
  endtask
  task automatic load(input int c, input logic [31:0] a, output logic [31:0] d);
    bit ok;
    d_op(c, 1'b0, 1'b0, 1'b0, a, '0, '0, d, ok);
  endtask
  task automatic load_chk(input int c, input logic [31:0] a);
    logic [31:0] d;
    load(c, a, d);
    check(d == gword(a), $sformatf("core %0d load %h: got %h expected %h", c, a, d, gword(a)));
  endtask
  task automatic store(input int c, input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    logic [31:0] x; bit ok;
    gwrite(a, d, be);
    d_op(c, 1'b1, 1'b0, 1'b0, a, d, be, x, ok);
  endtask
  task automatic vfetch(input int c, input logic [31:0] a, input bit wic, input bit virt,
                        input logic [7:0] pid, input logic [31:0] pa, output logic [31:0] d);
    i_wait[c] = 0;
    forever begin
      @(negedge clk_core);
      iq_tb[c] = '{req: 1'b1, wic: wic, virt: virt, pid: pid, addr: a, paddr: pa};
      #4;
      if (iresp[c].ack) begin
        d = iresp[c].data;
        @(posedge clk_core); #1 iq_tb[c] = '0;
        break;
      end
      i_wait[c]++;
      if (i_wait[c] > 2000) begin check(0, "fetch never acknowledged"); break; end
    end
  endtask
  task automatic fetch(input int c, input logic [31:0] a, input bit wic, output logic [31:0] d);
    vfetch(c, a, wic, 1'b0, 8'h00, a, d);
  endtask
  task automatic fetch_chk(input int c, input logic [31:0] a);
    logic [31:0] d;
    fetch(c, a, 1'b0, d);
    check(d == gword(a), $sformatf("core %0d fetch %h: got %h expected %h", c, a, d, gword(a)));
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_d_rmiss [NC], n_d_rhit [NC], n_d_whit [NC], n_d_wmiss [NC];
  int n_i_miss [NC], n_i_hit [NC], n_inv_hit [NC], n_pf_hit [NC];
  int n_bcast = 0, n_cfail = 0, n_two_reads = 0;
  int n_swx_ok = 0, n_swx_fail = 0, n_wdc = 0, n_wic = 0, n_lru = 0, n_dm = 0, n_virt = 0;

  always @(posedge clk_core) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      n_d_rmiss[c] += int'(dc_events[c].rd_miss);
      n_d_rhit[c]  += int'(dc_events[c].rd_hit);
      n_d_whit[c]  += int'(dc_events[c].wr_hit);
      n_d_wmiss[c] += int'(dc_events[c].wr_miss);
      n_inv_hit[c] += int'(dc_events[c].inv_hit);
      n_i_miss[c]  += int'(ic_events[c].rd_miss);
      n_i_hit[c]   += int'(ic_events[c].rd_hit);
      n_pf_hit[c]  += int'(pf_hit[c]);
    end
    n_bcast += int'(ev_inv_broadcast);
    n_cfail += int'(ev_cond_fail);
  end
  always @(posedge clk_mem) if (rst_n) begin
    n_two_reads += int'(reads_outstanding >= 3'd2);
    check(reads_outstanding <= 3'd4, "more than four reads outstanding");
  end

  // ------------------------------------------------------------ addresses
  localparam logic [31:0] CODE = 32'h0000_0000;   // shared code, never written
  localparam logic [31:0] PRIV0 = 32'h0002_0000;  // private data of core 0
  localparam logic [31:0] PRIV1 = 32'h0002_8000;  // private data of core 1
  localparam logic [31:0] SHARED = 32'h0003_0000; // shared data
  localparam int D0_STRIDE = 4096 / 4;            // bytes between lines of one set, 4 kB 4-way
  localparam int D1_STRIDE = 8192;                // direct-mapped 8 kB

  logic [31:0] r, A;
  bit ok;
  int miss_lat, t0, n0;

  task automatic random_core(input int c, input int n);
    logic [31:0] base;
    base = (c == 0) ? PRIV0 : PRIV1;
    fork
      for (int k = 0; k < n; k++) begin
        logic [31:0] a;
        a = base + 32'(($urandom % 4096) * 4);         // 16 kB private window
        if (($urandom % 3) == 0) store(c, a, $urandom, 4'($urandom) | 4'b0001);
        else load_chk(c, a);
      end
      begin
        logic [31:0] pc;
        pc = CODE + 32'(($urandom % 8192) * 4);
        for (int k = 0; k < n; k++) begin
          fetch_chk(c, pc);
          pc = (($urandom % 8) == 0) ? CODE + 32'(($urandom % 8192) * 4) : pc + 32'd4;
          pc = pc & 32'h0000_7FFC;
        end
      end
    join
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin dq_tb[c] = '0; iq_tb[c] = '0; end
    repeat (4) @(posedge clk_core);
    rst_n = 1'b1;
    repeat (10) @(posedge clk_core);

    // ---- best-case data miss on an idle system, then a hit
    A = PRIV0 + 32'h40;
    load_chk(0, A);
    miss_lat = d_wait[0];
    $display("best-case data miss: %0d core cycles from request to data", miss_lat + 1);
    // The memory model answers in about 28 fast-clock cycles (14 core cycles),
    // the native-port latency of the reference system, whose best case is 27
    // core cycles; the links here cost some cycles more (see the README).
    check(miss_lat + 1 >= 27 && miss_lat + 1 <= 36, $sformatf("miss latency %0d out of range", miss_lat + 1));
    load_chk(0, A + 4);
    check(d_wait[0] == 0, "data hit answered in the request cycle");

    // ---- instruction misses, hits and stride-1 prefetch
    n0 = n_pf_hit[0];
    for (int k = 0; k < 32; k++) fetch_chk(0, CODE + 32'h100 + 32'(4 * k));
    check(n_pf_hit[0] > n0, "sequential fetch used prefetched lines");
    for (int k = 0; k < 32; k++) fetch_chk(0, CODE + 32'h100 + 32'(4 * k));
    check(i_wait[0] == 0, "refetch hits");

    // ---- write-through store hit and store miss (no allocate)
    store(0, A, 32'h1234_ABCD, 4'b1111);
    load_chk(0, A);
    check(d_wait[0] == 0, "store hit kept the line");
    store(0, PRIV0 + 32'h2000, 32'h5555_6666, 4'b0110);
    n0 = n_d_rmiss[0];
    load_chk(0, PRIV0 + 32'h2000);
    check(n_d_rmiss[0] == n0 + 1, "store miss did not allocate");

    // ---- write-invalidate coherency: core 1 caches a word, core 0 writes it
    A = SHARED + 32'h80;
    load_chk(1, A);
    load_chk(1, A);
    check(d_wait[1] == 0, "core 1 holds the shared line");
    n0 = n_inv_hit[1];
    store(0, A, 32'hFEED_BEEF, 4'hF);
    t0 = 0;
    while (n_inv_hit[1] == n0 && t0 < 200) begin @(posedge clk_core); t0++; end
    check(n_inv_hit[1] == n0 + 1, "broadcast invalidated core 1's copy");
    load_chk(1, A);
    check(d_wait[1] > 0, "core 1 missed after invalidation and saw the new value");

    // ---- LWX / SWX success
    A = SHARED + 32'h200;
    d_op(0, 1'b0, 1'b1, 1'b0, A, '0, '0, r, ok);
    check(r == gword(A), "LWX data");
    check(resv_valid[0], "LWX set core 0's reservation");
    d_op(0, 1'b1, 1'b1, 1'b0, A, 32'hAAAA_0001, 4'hF, r, ok);
    check(ok, "SWX with reservation succeeded");
    if (ok) begin gwrite(A, 32'hAAAA_0001, 4'hF); n_swx_ok++; end
    load_chk(0, A);

    // ---- LWX / SWX failure: core 1 stores to the reserved word in between
    d_op(0, 1'b0, 1'b1, 1'b0, A, '0, '0, r, ok);
    check(r == gword(A), "second LWX data");
    store(1, A, 32'hBBBB_0002, 4'hF);
    t0 = 0;
    while (resv_valid[0] && t0 < 200) begin @(posedge clk_core); t0++; end
    check(!resv_valid[0], "other core's store cleared the reservation");
    n0 = n_cfail;
    d_op(0, 1'b1, 1'b1, 1'b0, A, 32'hAAAA_0003, 4'hF, r, ok);
    check(!ok && n_cfail == n0 + 1, "SWX after a foreign store failed");
    if (!ok) n_swx_fail++;
    load_chk(0, A);
    load_chk(1, A);

    // ---- WDC and WIC
    A = PRIV1 + 32'h300;
    load_chk(1, A);
    d_op(1, 1'b0, 1'b0, 1'b1, A, '0, '0, r, ok);
    n0 = n_d_rmiss[1];
    load_chk(1, A);
    check(n_d_rmiss[1] == n0 + 1, "WDC invalidated the line");
    if (n_d_rmiss[1] == n0 + 1) n_wdc++;
    fetch_chk(1, CODE + 32'h400);
    fetch(1, CODE + 32'h400, 1'b1, r);
    n0 = n_i_miss[1];
    fetch_chk(1, CODE + 32'h400);
    check(n_i_miss[1] == n0 + 1, "WIC invalidated the line");
    if (n_i_miss[1] == n0 + 1) n_wic++;

    // ---- virtual fetches: one virtual address, two processes, two physical lines
    begin
      logic [31:0] va, pa1, pa2;
      va = 32'h0800_0840; pa1 = CODE + 32'h840; pa2 = CODE + 32'h1840;
      n0 = n_i_miss[0];
      vfetch(0, va, 1'b0, 1'b1, 8'd3, pa1, r);
      check(r == gword(pa1), "process 3 fetch returns its physical word");
      vfetch(0, va, 1'b0, 1'b1, 8'd4, pa2, r);
      check(r == gword(pa2) && n_i_miss[0] == n0 + 2, "process 4 misses and returns its own word");
      vfetch(0, va, 1'b0, 1'b1, 8'd3, pa1, r);
      check(r == gword(pa1) && i_wait[0] == 0, "process 3 line still cached");
      vfetch(0, va + 4, 1'b0, 1'b1, 8'd4, pa2 + 4, r);
      check(r == gword(pa2 + 4) && i_wait[0] == 0, "process 4 line still cached");
      if (n_i_miss[0] == n0 + 2) n_virt++;
    end

    // ---- LRU in core 0's 4-way data cache: five lines of one set
    for (int t = 1; t <= 4; t++) load_chk(0, PRIV0 + 32'h4000 + 32'(t * D0_STRIDE));
    load_chk(0, PRIV0 + 32'h4000 + 32'(1 * D0_STRIDE));          // line 2 is now LRU
    load_chk(0, PRIV0 + 32'h4000 + 32'(5 * D0_STRIDE));          // evicts line 2
    n0 = n_d_rmiss[0];
    for (int t = 1; t <= 5; t++) if (t != 2) load_chk(0, PRIV0 + 32'h4000 + 32'(t * D0_STRIDE));
    check(n_d_rmiss[0] == n0, "recently used lines kept");
    load_chk(0, PRIV0 + 32'h4000 + 32'(2 * D0_STRIDE));
    check(n_d_rmiss[0] == n0 + 1, "least recently used line evicted");
    if (n_d_rmiss[0] == n0 + 1) n_lru++;

    // ---- direct-mapped conflict in core 1's data cache
    load_chk(1, PRIV1 + 32'h10);
    load_chk(1, PRIV1 + 32'h10 + 32'(D1_STRIDE));
    n0 = n_d_rmiss[1];
    load_chk(1, PRIV1 + 32'h10);
    check(n_d_rmiss[1] == n0 + 1, "conflicting line replaced in the direct-mapped cache");
    if (n_d_rmiss[1] == n0 + 1) n_dm++;

    // ---- both cores miss together
    fork
      load_chk(0, PRIV0 + 32'h3F00);
      load_chk(1, PRIV1 + 32'h3F00);
    join

    // ---- random traffic on both cores at once
    fork
      random_core(0, 1500);
      random_core(1, 1500);
    join
    repeat (50) @(posedge clk_core);

    // ---- every mechanism happened
    for (int c = 0; c < NC; c++) begin
      check(n_d_rmiss[c] > 0, $sformatf("core %0d data read misses: %0d", c, n_d_rmiss[c]));
      check(n_d_rhit[c] > 0,  $sformatf("core %0d data read hits: %0d", c, n_d_rhit[c]));
      check(n_d_whit[c] > 0,  $sformatf("core %0d write-through store hits: %0d", c, n_d_whit[c]));
      check(n_d_wmiss[c] > 0, $sformatf("core %0d write-through store misses: %0d", c, n_d_wmiss[c]));
      check(n_i_miss[c] > 0,  $sformatf("core %0d instruction misses: %0d", c, n_i_miss[c]));
      check(n_i_hit[c] > 0,   $sformatf("core %0d instruction hits: %0d", c, n_i_hit[c]));
      check(n_pf_hit[c] > 0,  $sformatf("core %0d prefetch hits: %0d", c, n_pf_hit[c]));
      check(dc_dbg[c].miss_count > 0 && ic_dbg[c].miss_count > 0, "debug miss counters advanced");
    end
    check(n_inv_hit[1] > 0, $sformatf("invalidations that dropped a line: %0d", n_inv_hit[1]));
    check(n_bcast > 0,      $sformatf("invalidation broadcasts: %0d", n_bcast));
    check(n_swx_ok > 0,     $sformatf("successful SWX: %0d", n_swx_ok));
    check(n_swx_fail > 0 && n_cfail > 0, $sformatf("failed SWX: %0d", n_swx_fail));
    check(n_wdc > 0,        $sformatf("WDC line invalidations: %0d", n_wdc));
    check(n_wic > 0,        $sformatf("WIC line invalidations: %0d", n_wic));
    check(n_virt > 0,       $sformatf("virtual fetch cases: %0d", n_virt));
    check(n_lru > 0,        $sformatf("LRU evictions checked: %0d", n_lru));
    check(n_dm > 0,         $sformatf("direct-mapped conflicts checked: %0d", n_dm));
    check(n_two_reads > 0,  $sformatf("memory cycles with two reads outstanding: %0d", n_two_reads));
    $display("counts: d_rmiss=%0d/%0d d_rhit=%0d/%0d i_miss=%0d/%0d pf_hit=%0d/%0d bcast=%0d inv_hit=%0d/%0d two_reads=%0d",
             n_d_rmiss[0], n_d_rmiss[1], n_d_rhit[0], n_d_rhit[1], n_i_miss[0], n_i_miss[1],
             n_pf_hit[0], n_pf_hit[1], n_bcast, n_inv_hit[0], n_inv_hit[1], n_two_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

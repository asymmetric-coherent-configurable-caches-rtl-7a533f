// tb_icache: self-checking test of the L1 instruction cache on its own.
// The testbench returns line words on the data link after a fixed delay.
// Checked: miss fill and its timing, hits in the request cycle, the request
// packet (fetch address only), WIC invalidation ignoring the tag, 2-way LRU
// eviction, virtual fetches (translated address on the link, process ID and
// address type taking part in the match), and a random stream of physical and
// virtual fetches compared with the memory image.
module tb_icache;
  import pb_pkg::*;
  localparam int LW = 8, WAYS = 2, BYTES = 1024;
  localparam int SETS = BYTES / (4 * LW * WAYS);   // 16
  localparam int FILL_DELAY = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  mb_ireq_t cpu_req;
  mb_iresp_t cpu_resp;
  logic req_wr_en, req_full, data_rd_en, data_empty;
  logic [31:0] req_wr_data, data_rd_data;
  ic_events_t events;
  cache_dbg_t dbg;

  icache #(.CACHE_BYTES(BYTES), .LINE_WORDS(LW), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] img(input logic [31:0] a);
    return {a[31:2], 2'b00} * 32'h9E37_79B9 + 32'h1234;
  endfunction

  typedef struct { logic [31:0] w; longint t; } tw_t;
  tw_t dq [$];
  logic [31:0] last_pkt;
  longint cyc = 0;
  int n_pkts = 0, n_hit_ev = 0, n_miss_ev = 0;
  bit full_random = 1'b0;

  initial begin req_full = 1'b0; data_empty = 1'b1; data_rd_data = '0; end

  always @(negedge clk) begin
    #4;
    if (events.rd_hit) n_hit_ev++;
    if (events.rd_miss) n_miss_ev++;
    if (req_wr_en && !req_full) begin
      logic [31:0] base;
      n_pkts++; last_pkt = req_wr_data;
      base = {req_wr_data[31:2+$clog2(LW)], {($clog2(LW)+2){1'b0}}};
      for (int i = 0; i < LW; i++) dq.push_back('{w: img(base + 32'(4*i)), t: cyc + longint'(FILL_DELAY)});
    end
    if (data_rd_en && !data_empty) void'(dq.pop_front());
    @(posedge clk);
    #1;
    cyc++;
    data_empty   = !(dq.size() > 0 && dq[0].t <= cyc);
    data_rd_data = (dq.size() > 0) ? dq[0].w : '0;
    req_full     = full_random && (($urandom % 3) == 0);
  end

  int last_wait;
  task automatic vfetch(input logic [31:0] a, input bit wic, input bit virt, input logic [7:0] pid,
                        input logic [31:0] pa, output logic [31:0] d);
    last_wait = 0;
    forever begin
      @(negedge clk);
      cpu_req = '{req: 1'b1, wic: wic, virt: virt, pid: pid, addr: a, paddr: pa};
      #4;
      if (cpu_resp.ack) begin
        d = cpu_resp.data;
        @(posedge clk); #1 cpu_req = '0;
        break;
      end
      last_wait++;
    end
  endtask
  task automatic fetch(input logic [31:0] a, input bit wic, output logic [31:0] d);
    vfetch(a, wic, 1'b0, 8'h00, 32'h0, d);
  endtask
  // translation used by the virtual fetches of this test
  function automatic logic [31:0] xlate(input logic [7:0] pid, input logic [31:0] va);
    return va ^ {8'h00, pid, 16'h0000} ^ 32'h0040_0000;
  endfunction

  function automatic logic [31:0] sa(input int set, input int tag, input int word);
    return 32'((tag * SETS + set) * LW * 4 + word * 4);
  endfunction

  logic [31:0] r;
  int n0;
  initial begin
    cpu_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fetch(32'h0000_2014, 1'b0, r);
    check(r == img(32'h0000_2014), "miss data");
    check(n_pkts == 1 && last_pkt == 32'h0000_2014, "request packet is the fetch address");
    check(last_wait >= FILL_DELAY + LW && last_wait <= FILL_DELAY + LW + 3,
          $sformatf("miss waited %0d cycles", last_wait));
    for (int w = 0; w < LW; w++) begin
      fetch(32'h0000_2000 + 32'(4*w), 1'b0, r);
      check(r == img(32'h0000_2000 + 32'(4*w)) && last_wait == 0, "hit in request cycle");
    end
    check(n_pkts == 1, "whole line cached");
    // WIC with another tag, same set
    fetch(32'h0100_2000, 1'b1, r);
    fetch(32'h0000_2000, 1'b0, r);
    check(n_pkts == 2, "WIC invalidated the line");
    // 2-way LRU
    fetch(sa(3, 1, 0), 1'b0, r); fetch(sa(3, 2, 0), 1'b0, r);
    fetch(sa(3, 1, 0), 1'b0, r);                 // 2 is LRU now
    fetch(sa(3, 3, 0), 1'b0, r);                 // evicts 2
    n0 = n_pkts;
    fetch(sa(3, 1, 0), 1'b0, r); fetch(sa(3, 3, 0), 1'b0, r);
    check(n_pkts == n0, "recent lines kept");
    fetch(sa(3, 2, 0), 1'b0, r);
    check(n_pkts == n0 + 1, "LRU line evicted");
    // virtual fetches: same virtual address in two processes, then physical
    n0 = n_pkts;
    vfetch(32'h0000_3008, 1'b0, 1'b1, 8'd5, xlate(8'd5, 32'h0000_3008), r);
    check(r == img(xlate(8'd5, 32'h0000_3008)) && n_pkts == n0 + 1, "virtual miss returns translated word");
    check(last_pkt == xlate(8'd5, 32'h0000_3008), "miss request carries the translated address");
    vfetch(32'h0000_300C, 1'b0, 1'b1, 8'd5, xlate(8'd5, 32'h0000_300C), r);
    check(r == img(xlate(8'd5, 32'h0000_300C)) && last_wait == 0 && n_pkts == n0 + 1, "virtual hit");
    vfetch(32'h0000_3008, 1'b0, 1'b1, 8'd6, xlate(8'd6, 32'h0000_3008), r);
    check(r == img(xlate(8'd6, 32'h0000_3008)) && n_pkts == n0 + 2, "other process misses on same address");
    vfetch(32'h0000_3008, 1'b0, 1'b1, 8'd5, xlate(8'd5, 32'h0000_3008), r);
    check(r == img(xlate(8'd5, 32'h0000_3008)) && n_pkts == n0 + 2 && last_wait == 0,
          "first process line kept in the other way");
    vfetch(32'h0000_3008, 1'b0, 1'b0, 8'd5, 32'h0, r);
    check(r == img(32'h0000_3008) && n_pkts == n0 + 3 && last_pkt == 32'h0000_3008,
          "physical fetch does not match a virtual line");
    vfetch(32'h0000_3008, 1'b0, 1'b0, 8'd9, 32'h0, r);
    check(r == img(32'h0000_3008) && n_pkts == n0 + 3 && last_wait == 0,
          "process ID ignored for physical lines");
    vfetch(32'h0000_3008, 1'b0, 1'b1, 8'd6, xlate(8'd6, 32'h0000_3008), r);
    check(n_pkts == n0 + 4, "least recently used process line was replaced");
    // random fetch stream with loops
    full_random = 1'b1;
    begin
      logic [31:0] pc;
      pc = 32'h0001_0000;
      for (int i = 0; i < 1500; i++) begin
        logic [7:0] pid;
        pid = 8'($urandom % 4);
        if (pid == 0) begin
          fetch(pc, 1'b0, r);
          check(r == img(pc), $sformatf("fetch %h", pc));
        end else begin
          vfetch(pc, 1'b0, 1'b1, pid, xlate(pid, pc), r);
          check(r == img(xlate(pid, pc)), $sformatf("virtual fetch %h pid %0d", pc, pid));
        end
        pc = (($urandom % 8) == 0) ? 32'h0001_0000 + 32'(($urandom % 512) * 4) : pc + 4;
      end
    end
    check(n_hit_ev + n_miss_ev > 1500 && n_miss_ev == n_pkts, "profiler strobes count fetches");
    check(dbg.miss_count == 32'(n_pkts), "debug request counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

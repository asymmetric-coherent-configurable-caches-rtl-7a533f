// tb_polyblaze_quad: memory read latency of a quad-core system, the
// configuration of the latency study: four cores, each with 4 kB 4-way LRU
// instruction and data caches with 4-word lines, caches and arbiters on one
// clock and the memory interface on a clock twice as fast.
//
// The test runs three stages with one, two and four active cores. Each active
// core streams loads and stores over its own 64 kB data window, so most loads
// miss, while it also fetches instructions. The latency of every data read
// miss (request to data, in core cycles) is collected per stage, and every
// load and fetch is checked against a reference copy of memory. Checked: the
// best-case miss latency, the average latency growing with the number of
// active cores, all four cores having reads outstanding at the memory port at
// once and never more than four, and invalidation broadcasts reaching the
// three other cores.
module tb_polyblaze_quad;
  import pb_pkg::*;
  localparam int NC = 4;

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

  localparam logic [NC-1:0][31:0] SZ4K = {NC{32'd4096}};
  localparam logic [NC-1:0][31:0] W4   = {NC{32'd4}};
  polyblaze_mem_top #(.N_CORES(NC), .D_BYTES(SZ4K), .D_WAYS(W4), .D_LINE_WORDS(W4),
                      .I_BYTES(SZ4K), .I_WAYS(W4), .I_LINE_WORDS(W4)) dut (.*);
  mpmc_model #(.MEM_WORDS(262144), .LATENCY(24), .QDEPTH(4)) u_mem (.clk(clk_mem), .*);

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
    #40000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference memory, same start image as the model
  logic [31:0] gold [logic [29:0]];
  function automatic logic [31:0] gword(input logic [31:0] a);
    logic [29:0] i;
    i = a[31:2] & 30'h3FFFF;
    return gold.exists(i) ? gold[i] : ((32'(i) * 32'h0001_0001) ^ 32'hC0DE_0000);
  endfunction

  int d_wait [NC], i_wait [NC];
  task automatic d_op(input int c, input bit we, input logic [31:0] a, input logic [31:0] wd,
                      output logic [31:0] rdata);
    d_wait[c] = 0;
    forever begin
      @(negedge clk_core);
      dq_tb[c] = '{req: 1'b1, we: we, cond: 1'b0, wdc: 1'b0, addr: a, wdata: wd, be: 4'hF};
      #4;
      if (dresp[c].ack) begin
        rdata = dresp[c].rdata;
        @(posedge clk_core); #1 dq_tb[c] = '0;
        break;
      end
      d_wait[c]++;
      if (d_wait[c] > 5000) begin check(0, "data request never acknowledged"); break; end
    end
  endtask
  task automatic fetch_chk(input int c, input logic [31:0] a);
    i_wait[c] = 0;
    forever begin
      @(negedge clk_core);
      iq_tb[c] = '{req: 1'b1, wic: 1'b0, virt: 1'b0, pid: '0, addr: a, paddr: a};
      #4;
      if (iresp[c].ack) begin
        check(iresp[c].data == gword(a), $sformatf("core %0d fetch %h", c, a));
        @(posedge clk_core); #1 iq_tb[c] = '0;
        break;
      end
      i_wait[c]++;
      if (i_wait[c] > 5000) begin check(0, "fetch never acknowledged"); break; end
    end
  endtask

  // latency statistics of data read misses, per stage
  int lat_n, lat_sum, lat_min, lat_max, lat_29_35;
  task automatic stat_clear();
    lat_n = 0; lat_sum = 0; lat_min = 1 << 30; lat_max = 0; lat_29_35 = 0;
  endtask
  task automatic stat_add(input int l);
    lat_n++; lat_sum += l;
    if (l < lat_min) lat_min = l;
    if (l > lat_max) lat_max = l;
    if (l >= 29 && l <= 35) lat_29_35++;
  endtask

  task automatic run_core(input int c, input int n);
    logic [31:0] base;
    base = 32'h0004_0000 + 32'(c) * 32'h0001_0000;
    fork
      for (int k = 0; k < n; k++) begin
        logic [31:0] a, r;
        int misses0;
        a = base + 32'(($urandom % 16384) * 4);
        if (($urandom % 4) == 0) begin
          logic [31:0] d;
          d = $urandom;
          gold[a[31:2] & 30'h3FFFF] = d;
          d_op(c, 1'b1, a, d, r);
        end else begin
          misses0 = dc_dbg[c].miss_count;
          d_op(c, 1'b0, a, '0, r);
          check(r == gword(a), $sformatf("core %0d load %h", c, a));
          if (dc_dbg[c].miss_count != misses0) stat_add(d_wait[c] + 1);
        end
      end
      begin
        logic [31:0] pc;
        pc = 32'(c) * 32'h2000;
        for (int k = 0; k < n / 2; k++) begin
          fetch_chk(c, pc);
          pc = (($urandom % 16) == 0) ? 32'(($urandom % 32768) * 4) : pc + 32'd4;
          pc = pc & 32'h0001_FFFC;
        end
      end
    join
  endtask

  int max_out = 0, n_four = 0;
  int n_inv [NC];
  always @(posedge clk_mem) if (rst_n) begin
    if (int'(reads_outstanding) > max_out) max_out = int'(reads_outstanding);
    n_four += int'(reads_outstanding == 3'd4);
  end
  always @(posedge clk_core) if (rst_n)
    for (int c = 0; c < NC; c++) n_inv[c] += int'(dc_events[c].inv_pkt);

  real mean [3];
  int best;
  initial begin
    for (int c = 0; c < NC; c++) begin dq_tb[c] = '0; iq_tb[c] = '0; end
    repeat (4) @(posedge clk_core);
    rst_n = 1'b1;
    repeat (10) @(posedge clk_core);

    // best case: one miss on an idle system
    begin
      logic [31:0] r;
      d_op(0, 1'b0, 32'h0003_0000, '0, r);
      best = d_wait[0] + 1;
      check(r == gword(32'h0003_0000), "first load");
    end

    for (int st = 0; st < 3; st++) begin
      int act;
      act = (st == 0) ? 1 : (st == 1) ? 2 : 4;
      stat_clear();
      case (act)
        1: run_core(0, 400);
        2: fork run_core(0, 400); run_core(1, 400); join
        default: fork run_core(0, 400); run_core(1, 400); run_core(2, 400); run_core(3, 400); join
      endcase
      mean[st] = real'(lat_sum) / real'(lat_n);
      $display("%0d active core(s): %0d read misses, latency min %0d mean %0.1f max %0d, %0d%% in 29..35 cycles",
               act, lat_n, lat_min, mean[st], lat_max, (100 * lat_29_35) / lat_n);
      check(lat_n > 100, "enough read misses measured");
      repeat (50) @(posedge clk_core);
    end
    $display("best-case miss %0d core cycles; max reads outstanding %0d (%0d memory cycles at four)",
             best, max_out, n_four);
    check(best >= 27 && best <= 36, "best-case miss latency");
    check(mean[1] > mean[0] && mean[2] > mean[1], "latency grows with active cores");
    check(max_out == 4 && n_four > 0, "four reads outstanding at the memory port");
    for (int c = 1; c < NC; c++) check(n_inv[c] > 0, $sformatf("core %0d received invalidations", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

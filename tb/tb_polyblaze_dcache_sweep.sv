// tb_polyblaze_dcache_sweep: the data-cache configurations of the
// single-process study, run side by side.
//
// Twelve single-core systems are built, one for each data cache of
// {4, 8, 16, 32} kB x {direct-mapped, 2-way, 4-way} LRU, every one with a
// 16 kB 4-way LRU instruction cache and 4-word lines. Each system has its own
// memory model. All twelve receive the same stream of loads and stores (the
// next operation starts when every system has answered the previous one), so
// their read-miss counts can be compared exactly.
//
// The stream mixes a hot region the size of the mid-sized caches with a
// larger cold region, a strided scan and a small loop, to stand in for a
// program's data accesses (the benchmark programs themselves need the
// processor). Checked: every load returns the right word in every system, and
// the LRU inclusion property: among caches with the same number of sets, one
// with more ways never misses more (4 kB 1-way >= 8 kB 2-way >= 16 kB 4-way,
// 8 kB 1-way >= 16 kB 2-way >= 32 kB 4-way, 4 kB 2-way >= 8 kB 4-way).
// Miss rates are printed as a table.
module tb_polyblaze_dcache_sweep;
  import pb_pkg::*;
  localparam int NCFG = 12;
  localparam int KB   [NCFG] = '{4, 8, 16, 32, 4, 8, 16, 32, 4, 8, 16, 32};
  localparam int WY   [NCFG] = '{1, 1, 1, 1, 2, 2, 2, 2, 4, 4, 4, 4};

  logic clk_core = 1'b0, clk_mem = 1'b0, rst_n = 1'b0;
  always #10 clk_core = ~clk_core;
  always #5  clk_mem  = ~clk_mem;

  mb_dreq_t   dqs   [NCFG];
  mb_dresp_t  dresp [NCFG];
  dc_events_t dev   [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_sys
    mb_dresp_t  [0:0] dr;
    mb_iresp_t  [0:0] ir;
    dc_events_t [0:0] de;
    ic_events_t [0:0] ie;
    cache_dbg_t [0:0] dd, id;
    logic [0:0] pfh, pfm, rv;
    logic cv, cr, crnw, rdv, rdl, rdr, eib, ecf;
    logic [31:0] ca, cw, rd;
    logic [3:0] cn, cb;
    logic [2:0] ro;
    mb_dreq_t [0:0] dqa;
    mb_ireq_t [0:0] iqa;
    assign dqa[0] = dqs[g];
    assign iqa[0] = '0;
    polyblaze_mem_top #(.N_CORES(1), .D_BYTES(32'(KB[g] * 1024)), .D_WAYS(32'(WY[g])),
                        .D_LINE_WORDS(32'd4), .I_BYTES(32'd16384), .I_WAYS(32'd4),
                        .I_LINE_WORDS(32'd4)) u_sys (
      .clk_core, .clk_arb(clk_core), .clk_mem, .rst_n,
      .dreq(dqa), .dresp(dr), .ireq(iqa), .iresp(ir), .dc_events(de), .ic_events(ie),
      .dc_dbg(dd), .ic_dbg(id), .pf_hit(pfh), .pf_miss(pfm),
      .npi_cmd_valid(cv), .npi_cmd_ready(cr), .npi_cmd_rnw(crnw), .npi_cmd_addr(ca),
      .npi_cmd_nwords(cn), .npi_cmd_be(cb), .npi_cmd_wdata(cw),
      .npi_rd_valid(rdv), .npi_rd_data(rd), .npi_rd_last(rdl), .npi_rd_ready(rdr),
      .resv_valid(rv), .ev_inv_broadcast(eib), .ev_cond_fail(ecf), .reads_outstanding(ro));
    mpmc_model #(.MEM_WORDS(65536), .LATENCY(24), .QDEPTH(4)) u_mem (
      .clk(clk_mem), .rst_n,
      .npi_cmd_valid(cv), .npi_cmd_ready(cr), .npi_cmd_rnw(crnw), .npi_cmd_addr(ca),
      .npi_cmd_nwords(cn), .npi_cmd_be(cb), .npi_cmd_wdata(cw),
      .npi_rd_valid(rdv), .npi_rd_data(rd), .npi_rd_last(rdl), .npi_rd_ready(rdr));
    assign dresp[g] = dr[0];
    assign dev[g]   = de[0];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #40000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] gold [logic [29:0]];
  function automatic logic [31:0] gword(input logic [31:0] a);
    logic [29:0] i;
    i = a[31:2] & 30'hFFFF;
    return gold.exists(i) ? gold[i] : ((32'(i) * 32'h0001_0001) ^ 32'hC0DE_0000);
  endfunction

  int rd_miss [NCFG], rd_req [NCFG];
  always @(posedge clk_core) if (rst_n)
    for (int g = 0; g < NCFG; g++) begin
      rd_miss[g] += int'(dev[g].rd_miss);
      rd_req[g]  += int'(dev[g].rd_req && (dev[g].rd_hit || dev[g].rd_miss));
    end

  // one operation on all systems; each system's request is dropped after the
  // clock edge at which it answered, as a processor would
  task automatic op(input bit we, input logic [31:0] a, input logic [31:0] wd);
    bit done [NCFG], now [NCFG];
    int left, guard;
    left = NCFG; guard = 0;
    if (we) gold[a[31:2] & 30'hFFFF] = wd;
    @(negedge clk_core);
    for (int g = 0; g < NCFG; g++) begin
      done[g] = 1'b0;
      dqs[g] = '{req: 1'b1, we: we, cond: 1'b0, wdc: 1'b0, addr: a, wdata: wd, be: 4'hF};
    end
    while (left > 0 && guard < 5000) begin
      #4;
      for (int g = 0; g < NCFG; g++) begin
        now[g] = !done[g] && dresp[g].ack;
        if (now[g]) begin
          done[g] = 1'b1; left--;
          if (!we) check(dresp[g].rdata == gword(a), $sformatf("config %0d load %h", g, a));
        end
      end
      @(posedge clk_core);
      #1;
      for (int g = 0; g < NCFG; g++) if (now[g]) dqs[g] = '0;
      if (left > 0) @(negedge clk_core);
      guard++;
    end
    check(left == 0, "all systems answered");
  endtask

  initial begin
    logic [31:0] a;
    int step;
    for (int g = 0; g < NCFG; g++) dqs[g] = '0;
    repeat (4) @(posedge clk_core);
    rst_n = 1'b1;
    repeat (10) @(posedge clk_core);
    step = 0;
    for (int k = 0; k < 6000; k++) begin
      int sel;
      sel = $urandom % 100;
      if (sel < 55)      a = 32'h0001_0000 + 32'(($urandom % 3072) * 4);      // 12 kB hot region
      else if (sel < 70) a = 32'h0002_0000 + 32'(($urandom % 16384) * 4);     // 64 kB cold region
      else if (sel < 85) begin a = 32'h0003_0000 + 32'(step * 64); step = (step + 1) % 1024; end
      else               a = 32'h0000_8000 + 32'(($urandom % 256) * 4);       // 1 kB loop data
      op(($urandom % 4) == 0, a, $urandom);
    end
    $display("read miss rate (%%), rows: ways, columns: 4/8/16/32 kB");
    for (int w = 0; w < 3; w++)
      $display("  %0d-way: %5.2f %5.2f %5.2f %5.2f", WY[4*w],
               100.0 * rd_miss[4*w] / rd_req[4*w], 100.0 * rd_miss[4*w+1] / rd_req[4*w+1],
               100.0 * rd_miss[4*w+2] / rd_req[4*w+2], 100.0 * rd_miss[4*w+3] / rd_req[4*w+3]);
    // same number of sets, more ways: never more misses
    check(rd_miss[0] >= rd_miss[5] && rd_miss[5] >= rd_miss[10], "inclusion 256 sets");
    check(rd_miss[1] >= rd_miss[6] && rd_miss[6] >= rd_miss[11], "inclusion 512 sets");
    check(rd_miss[4] >= rd_miss[9], "inclusion 128 sets");
    for (int g = 0; g < NCFG; g++) check(rd_req[g] > 3000 && rd_miss[g] > 0, "reads and misses counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

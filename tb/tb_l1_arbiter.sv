// tb_l1_arbiter: the testbench plays both caches' link ends and the L2
// Arbiter (answers each read with the line words tagged with the source bit
// after a fixed latency). Checked: unified request packets (source bit, word
// count, write data in its own link), returned words reaching the right
// cache, one outstanding read, forwarding of invalidations and conditional
// results, the instruction-side prefetch, and a random mix of both caches'
// requests where every returned line is compared with the memory image.
module tb_l1_arbiter;
  import pb_pkg::*;
  localparam int DLW = 4, ILW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dreq_empty, dreq_pop, ireq_empty, ireq_pop;
  dreq_pkt_t dreq_data;
  logic [31:0] ireq_data;
  logic ddata_wr_en, ddata_full, dinv_wr_en, dinv_full, dcond_wr_en, dcond_wr_data, dcond_full;
  logic idata_wr_en, idata_full, l2req_wr_en, l2req_full, l2wd_wr_en, l2wd_full;
  logic [31:0] ddata_wr_data, dinv_wr_data, idata_wr_data, l2wd_wr_data, l2inv_data;
  l2req_pkt_t l2req_wr_data;
  logic l2rd_empty, l2rd_pop, l2inv_empty, l2inv_pop, l2cond_empty, l2cond_data, l2cond_pop;
  rdata_pkt_t l2rd_data;
  logic pf_hit, pf_miss;

  l1_arbiter #(.D_LINE_WORDS(DLW), .I_LINE_WORDS(ILW), .PREFETCH(1'b1)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] img(input logic [31:0] a);
    return {a[31:2], 2'b00} + 32'h7000_0000;
  endfunction

  typedef struct { rdata_pkt_t p; longint t; } tr_t;
  dreq_pkt_t dq [$];
  logic [31:0] iq [$], ivq [$], dgot [$], igot [$], dinv_got [$], wds [$];
  logic cq [$], dcond_got [$];
  l2req_pkt_t reqs [$];
  tr_t rq [$];
  longint cyc = 0;
  int outstanding_words = 0, max_out = 0;
  bit busy_l2 = 1'b0;

  initial begin
    dreq_empty = 1'b1; dreq_data = '0; ireq_empty = 1'b1; ireq_data = '0;
    ddata_full = 1'b0; dinv_full = 1'b0; dcond_full = 1'b0; idata_full = 1'b0;
    l2req_full = 1'b0; l2wd_full = 1'b0; l2rd_empty = 1'b1; l2rd_data = '0;
    l2inv_empty = 1'b1; l2inv_data = '0; l2cond_empty = 1'b1; l2cond_data = 1'b0;
  end

  always @(negedge clk) begin
    #4;
    if (dreq_pop && !dreq_empty) void'(dq.pop_front());
    if (ireq_pop && !ireq_empty) void'(iq.pop_front());
    if (l2req_wr_en && !l2req_full) begin
      reqs.push_back(l2req_wr_data);
      if (l2req_wr_data.rnw) begin
        logic [31:0] base;
        base = l2req_wr_data.addr & ~((32'(l2req_wr_data.nwords) << 2) - 1);
        for (int i = 0; i < int'(l2req_wr_data.nwords); i++)
          rq.push_back('{p: '{src: l2req_wr_data.src, word: img(base + 32'(4*i))}, t: cyc + 6});
        outstanding_words += int'(l2req_wr_data.nwords);
      end
    end
    if (l2wd_wr_en && !l2wd_full) wds.push_back(l2wd_wr_data);
    if (l2rd_pop && !l2rd_empty) begin void'(rq.pop_front()); outstanding_words--; end
    if (l2inv_pop && !l2inv_empty) void'(ivq.pop_front());
    if (l2cond_pop && !l2cond_empty) void'(cq.pop_front());
    if (ddata_wr_en && !ddata_full) dgot.push_back(ddata_wr_data);
    if (idata_wr_en && !idata_full) igot.push_back(idata_wr_data);
    if (dinv_wr_en && !dinv_full) dinv_got.push_back(dinv_wr_data);
    if (dcond_wr_en && !dcond_full) dcond_got.push_back(dcond_wr_data);
    if (outstanding_words > max_out) max_out = outstanding_words;
    @(posedge clk);
    #1;
    cyc++;
    dreq_empty   = dq.size() == 0;
    dreq_data    = (dq.size() > 0) ? dq[0] : '0;
    ireq_empty   = iq.size() == 0;
    ireq_data    = (iq.size() > 0) ? iq[0] : '0;
    l2rd_empty   = !(rq.size() > 0 && rq[0].t <= cyc);
    l2rd_data    = (rq.size() > 0) ? rq[0].p : '0;
    l2inv_empty  = ivq.size() == 0;
    l2inv_data   = (ivq.size() > 0) ? ivq[0] : '0;
    l2cond_empty = cq.size() == 0;
    l2cond_data  = (cq.size() > 0) ? cq[0] : 1'b0;
    ddata_full   = ($urandom % 5) == 0;
    idata_full   = ($urandom % 5) == 0;
    l2req_full   = ($urandom % 6) == 0;
  end

  task automatic wait_d(input int n); while (dgot.size() < n) @(posedge clk); endtask
  task automatic wait_i(input int n); while (igot.size() < n) @(posedge clk); endtask

  int d_lines = 0, i_lines = 0;
  logic [31:0] d_addr [$], i_addr [$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // data cache read
    dq.push_back('{addr: 32'h0000_0124, rnw: 1'b1, wdata: '0, be: 4'hF, cond: 1'b0});
    wait_d(DLW);
    check(reqs[0].src && reqs[0].rnw && reqs[0].nwords == 4'(DLW) && reqs[0].addr == 32'h124,
          "data read packet: source 1, line words");
    for (int i = 0; i < DLW; i++) check(dgot[i] == img(32'h120 + 32'(4*i)), "data words to data cache");
    // store and conditional store
    dq.push_back('{addr: 32'h0000_0200, rnw: 1'b0, wdata: 32'hABCD_0001, be: 4'b1100, cond: 1'b0});
    dq.push_back('{addr: 32'h0000_0204, rnw: 1'b0, wdata: 32'hABCD_0002, be: 4'hF, cond: 1'b1});
    repeat (20) @(posedge clk);
    check(reqs.size() == 3 && !reqs[1].rnw && reqs[1].nwords == 1 && reqs[1].be == 4'b1100 && reqs[1].src,
          "store packet");
    check(reqs[2].cond && !reqs[2].rnw, "conditional store packet");
    check(wds.size() == 2 && wds[0] == 32'hABCD_0001 && wds[1] == 32'hABCD_0002, "write data link");
    // invalidation and conditional result forwarding
    ivq.push_back(32'h0000_0300); ivq.push_back(32'h0000_0340);
    cq.push_back(1'b1); cq.push_back(1'b0);
    repeat (20) @(posedge clk);
    check(dinv_got.size() == 2 && dinv_got[0] == 32'h300 && dinv_got[1] == 32'h340, "invalidations forwarded");
    check(dcond_got.size() == 2 && dcond_got[0] && !dcond_got[1], "conditional results forwarded");
    // instruction read + prefetch
    iq.push_back(32'h0000_4008);
    wait_i(ILW);
    repeat (40) @(posedge clk);
    check(reqs[3].addr == 32'h4008 && !reqs[3].src && reqs[3].nwords == 4'(ILW), "instruction read packet");
    check(reqs.size() == 5 && reqs[4].addr == 32'h4020 && !reqs[4].src, "prefetch of next line issued");
    for (int i = 0; i < ILW; i++) check(igot[i] == img(32'h4000 + 32'(4*i)), "instruction words");
    // random mix of data and instruction reads
    dgot = {}; igot = {};
    for (int k = 0; k < 40; k++) begin
      logic [31:0] a;
      a = 32'(($urandom % 128) * 32);
      if (($urandom % 2) != 0) begin
        dq.push_back('{addr: a, rnw: 1'b1, wdata: '0, be: 4'hF, cond: 1'b0});
        d_addr.push_back(a);
        if (($urandom % 2) != 0) dq.push_back('{addr: a + 4, rnw: 1'b0, wdata: $urandom, be: 4'hF, cond: 1'b0});
      end else begin
        iq.push_back(a);
        i_addr.push_back(a);
      end
      repeat ($urandom % 30) @(posedge clk);
    end
    wait_d(DLW * d_addr.size());
    wait_i(ILW * i_addr.size());
    foreach (d_addr[k]) for (int i = 0; i < DLW; i++)
      check(dgot[k*DLW+i] == img((d_addr[k] & ~32'hF) + 32'(4*i)), "random data line");
    foreach (i_addr[k]) for (int i = 0; i < ILW; i++)
      check(igot[k*ILW+i] == img((i_addr[k] & ~32'h1F) + 32'(4*i)), "random instruction line");
    check(max_out <= ILW, $sformatf("at most one line read outstanding (max %0d words)", max_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_l2_arbiter: three ports; the testbench plays the L1 Arbiter link ends
// and a memory that executes commands in order and returns each read after a
// latency. Checked: round-robin order with and without idle ports, write
// invalidation broadcast to every other port (and not to the writer), return
// of read words to the requesting port with its source bit, the LWX/SWX
// rules, dropping of failed conditional stores, the limit of four
// outstanding reads, and stalling while an invalidation link is full.
module tb_l2_arbiter;
  import pb_pkg::*;
  localparam int P = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] req_empty, req_pop, wd_empty, wd_pop, rd_wr_en, rd_full, inv_wr_en, inv_full;
  logic [P-1:0] cond_wr_en, cond_wr_data, cond_full, resv_valid;
  l2req_pkt_t [P-1:0] req_data;
  logic [P-1:0][31:0] wd_data, inv_wr_data;
  rdata_pkt_t [P-1:0] rd_wr_data;
  logic mcmd_wr_en, mcmd_full, mwd_wr_en, mwd_full, mrd_empty, mrd_pop, ev_inv_broadcast, ev_cond_fail;
  mcmd_pkt_t mcmd_wr_data;
  logic [31:0] mwd_wr_data, mrd_data;

  l2_arbiter #(.PORTS(P), .MAX_READS(4)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] mem [logic [29:0]];
  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : {a[31:2], 2'b01};
  endfunction

  typedef struct { logic [31:0] w; longint t; } tw_t;
  l2req_pkt_t rq [P][$];
  logic [31:0] wq [P][$];
  rdata_pkt_t got [P][$];
  logic [31:0] inv_got [P][$];
  logic cond_got [P][$];
  int cmd_port [$];          // port of each memory command, by the port whose request popped
  tw_t mq [$];
  int reads_in_flight = 0, max_in_flight = 0, mem_lat = 10;
  longint cyc = 0;
  logic [P-1:0] inv_full_force = '0;

  initial begin
    req_empty = '1; req_data = '0; wd_empty = '1; wd_data = '0; rd_full = '0; inv_full = '0;
    cond_full = '0; mcmd_full = 1'b0; mwd_full = 1'b0; mrd_empty = 1'b1; mrd_data = '0;
  end

  always @(negedge clk) begin
    #4;
    for (int p = 0; p < P; p++) begin
      if (req_pop[p] && !req_empty[p]) begin void'(rq[p].pop_front()); cmd_port.push_back(p); end
      if (wd_pop[p] && !wd_empty[p]) void'(wq[p].pop_front());
      if (rd_wr_en[p]) got[p].push_back(rd_wr_data[p]);
      if (inv_wr_en[p]) inv_got[p].push_back(inv_wr_data[p]);
      if (cond_wr_en[p]) cond_got[p].push_back(cond_wr_data[p]);
    end
    if (mcmd_wr_en) begin
      if (mcmd_wr_data.rnw) begin
        logic [31:0] base;
        base = mcmd_wr_data.addr & ~((32'(mcmd_wr_data.nwords) << 2) - 1);
        for (int i = 0; i < int'(mcmd_wr_data.nwords); i++)
          mq.push_back('{w: rd(base + 32'(4*i)), t: cyc + longint'(mem_lat) + longint'(i)});
        reads_in_flight++;
      end else begin
        check(mwd_wr_en, "write command carries write data");
        mem[mcmd_wr_data.addr[31:2]] = mwd_wr_data;
      end
    end
    if (mrd_pop && !mrd_empty) begin
      void'(mq.pop_front());
    end
    if (reads_in_flight > max_in_flight) max_in_flight = reads_in_flight;
    @(posedge clk);
    #1;
    cyc++;
    for (int p = 0; p < P; p++) begin
      req_empty[p] = rq[p].size() == 0;
      req_data[p]  = (rq[p].size() > 0) ? rq[p][0] : '0;
      wd_empty[p]  = wq[p].size() == 0;
      wd_data[p]   = (wq[p].size() > 0) ? wq[p][0] : '0;
      inv_full[p]  = inv_full_force[p];
    end
    mrd_empty = !(mq.size() > 0 && mq[0].t <= cyc);
    mrd_data  = (mq.size() > 0) ? mq[0].w : '0;
  end

  // reads_in_flight drops when the last word of a read is delivered
  int words_seen = 0;
  always @(negedge clk) begin
    #4;
    if (mrd_pop && !mrd_empty) begin
      words_seen++;
      if (words_seen % 4 == 0) reads_in_flight--;
    end
  end

  function automatic l2req_pkt_t rdreq(input logic [31:0] a, input bit cond, input bit src);
    return '{addr: a, rnw: 1'b1, be: 4'hF, cond: cond, src: src, nwords: 4'd4};
  endfunction
  function automatic l2req_pkt_t wrreq(input logic [31:0] a, input bit cond);
    return '{addr: a, rnw: 1'b0, be: 4'hF, cond: cond, src: 1'b1, nwords: 4'd1};
  endfunction
  task automatic wr(input int p, input logic [31:0] a, input logic [31:0] d, input bit cond);
    rq[p].push_back(wrreq(a, cond)); wq[p].push_back(d);
  endtask
  task automatic idle(input int n); repeat (n) @(posedge clk); endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---- round robin over three busy ports (writes, so nothing waits for memory)
    for (int k = 0; k < 3; k++) for (int p = 0; p < P; p++) wr(p, 32'h1000 + 32'(16*p + 4*k), 32'(100*p + k), 1'b0);
    idle(30);
    check(cmd_port.size() == 9, "all nine requests executed");
    for (int i = 0; i < 9; i++) check(cmd_port[i] == i % 3, $sformatf("round-robin order, slot %0d", i));
    // ---- invalidations: each write went to the other two ports only
    for (int p = 0; p < P; p++) check(inv_got[p].size() == 6, $sformatf("port %0d got the 6 foreign invalidations", p));
    foreach (inv_got[0][i]) check(inv_got[0][i][7:4] != 4'h0, "port 0 not invalidated by its own write");
    check(mem[30'(32'h1014 >> 2)] == 32'd101, "write reached memory");
    // ---- idle port skipped
    cmd_port = {};
    for (int k = 0; k < 3; k++) begin wr(0, 32'h2000, 0, 1'b0); wr(2, 32'h2004, 0, 1'b0); end
    idle(30);
    check(cmd_port.size() == 6, "six executed");
    for (int i = 0; i < 6; i++) check(cmd_port[i] == (((i % 2) != 0) ? 2 : 0), "idle port 1 skipped");
    // ---- reads return to the requesting port with the source bit
    rq[1].push_back(rdreq(32'h1018, 1'b0, 1'b0));
    rq[2].push_back(rdreq(32'h1004, 1'b0, 1'b1));
    idle(40);
    check(got[1].size() == 4 && got[2].size() == 4 && got[0].size() == 0, "read words routed by port");
    check(got[1][0].word == rd(32'h1010) && got[1][2].word == rd(32'h1018) && !got[1][0].src, "port 1 line data and source");
    check(got[2][1].word == rd(32'h1004) && got[2][3].src, "port 2 line data and source");
    // ---- LWX / SWX
    foreach (cond_got[p]) cond_got[p] = {};
    rq[0].push_back(rdreq(32'h3000, 1'b1, 1'b1));
    idle(20);
    check(resv_valid == 3'b001, "LWX reserved for port 0");
    wr(1, 32'h3000, 32'h5555, 1'b0);                  // foreign store to the lock
    idle(10);
    wr(0, 32'h3000, 32'h7777, 1'b1);                  // SWX must fail
    idle(10);
    check(cond_got[0].size() == 1 && !cond_got[0][0], "SWX after foreign store fails");
    check(mem[30'(32'h3000 >> 2)] == 32'h5555, "failed SWX dropped");
    rq[0].push_back(rdreq(32'h3000, 1'b1, 1'b1));
    idle(20);
    wr(0, 32'h3000, 32'h8888, 1'b1);
    idle(10);
    check(cond_got[0].size() == 2 && cond_got[0][1], "SWX with reservation succeeds");
    check(mem[30'(32'h3000 >> 2)] == 32'h8888, "successful SWX written");
    // ---- outstanding-read limit
    mem_lat = 60;
    for (int k = 0; k < 4; k++) for (int p = 0; p < P; p++) rq[p].push_back(rdreq(32'h4000 + 32'(64*k + 16*p), 1'b0, 1'b1));
    idle(400);
    check(max_in_flight == 4, $sformatf("at most four reads in flight (saw %0d)", max_in_flight));
    check(got[0].size() == 8 + 16, "all reads returned to port 0");
    mem_lat = 10;
    // ---- full invalidation link stalls writes
    inv_full_force = 3'b100;
    cmd_port = {};
    wr(0, 32'h5000, 1, 1'b0);
    idle(10);
    check(cmd_port.size() == 0, "write waits while another port's invalidation link is full");
    inv_full_force = '0;
    idle(10);
    check(cmd_port.size() == 1 && mem[30'(32'h5000 >> 2)] == 1, "write proceeds when room appears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

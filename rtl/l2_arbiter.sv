// l2_arbiter: Level-2 Arbiter of the PolyBlaze memory system, with its lock arbiter.
//
// The single point through which every memory request of every port (one port
// per core's L1 Arbiter) passes. It has three jobs:
//   1. Serialise the requests of all ports towards memory. Ports are scanned
//      round robin; if the port whose turn it is has nothing, the next port
//      that has a request is served, so no cycle is wasted.
//   2. Keep the data caches coherent with a write-invalidate protocol: every
//      write that goes to memory is broadcast as an invalidation address to
//      every other port in the same cycle in which it enters the memory queues.
//   3. Resolve conditional loads and stores through lock_arbiter (one
//      reservation bit and address per port). A conditional store that fails
//      is dropped; the one-bit result of every conditional store is returned
//      on the port's conditional-result link.
// Read data comes back from memory in request order. The arbiter remembers,
// for each outstanding read (at most MAX_READS), the port, the source bit and
// the word count, and steers each returned word to that port's data link.
//
// A request is executed only when every link it writes has room, so it is
// atomic: a write is pushed to memory and all invalidations at once. A port
// whose selected request cannot be executed yet holds the round-robin pointer
// until it can (requests of a port stay in order).
//
// From the document: the three jobs, the round-robin scan, the broadcast to
// all other ports, the reservation rules. This design's choices: the
// one-cycle atomic broadcast, the read-tracking queue and its depth (4, the
// number of outstanding reads the memory port accepts), stall-on-busy.
module l2_arbiter
  import pb_pkg::*;
#(
  parameter int unsigned PORTS     = 2,
  parameter int unsigned MAX_READS = 4,
  localparam int unsigned PW       = (PORTS > 1) ? $clog2(PORTS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // per port: address request and write data links (read side)
  input  logic       [PORTS-1:0]  req_empty,
  input  l2req_pkt_t [PORTS-1:0]  req_data,
  output logic       [PORTS-1:0]  req_pop,
  input  logic       [PORTS-1:0]  wd_empty,
  input  logic [PORTS-1:0][31:0]  wd_data,
  output logic       [PORTS-1:0]  wd_pop,
  // per port: read data, invalidation and conditional-result links (write side)
  output logic       [PORTS-1:0]  rd_wr_en,
  output rdata_pkt_t [PORTS-1:0]  rd_wr_data,
  input  logic       [PORTS-1:0]  rd_full,
  output logic       [PORTS-1:0]  inv_wr_en,
  output logic [PORTS-1:0][31:0]  inv_wr_data,
  input  logic       [PORTS-1:0]  inv_full,
  output logic       [PORTS-1:0]  cond_wr_en,
  output logic       [PORTS-1:0]  cond_wr_data,
  input  logic       [PORTS-1:0]  cond_full,
  // memory side: command and write data links (write side), read data (read side)
  output logic                    mcmd_wr_en,
  output mcmd_pkt_t               mcmd_wr_data,
  input  logic                    mcmd_full,
  output logic                    mwd_wr_en,
  output logic [31:0]             mwd_wr_data,
  input  logic                    mwd_full,
  input  logic                    mrd_empty,
  input  logic [31:0]             mrd_data,
  output logic                    mrd_pop,
  // observation
  output logic [PORTS-1:0]        resv_valid,
  output logic                    ev_inv_broadcast,
  output logic                    ev_cond_fail
);
  // ----------------------------------------------------------- port selection
  logic [PW-1:0] rr;      // port whose turn it is
  logic [PW-1:0] sel;
  logic          any_req;

  always_comb begin
    sel     = rr;
    any_req = 1'b0;
    for (int k = 0; k < PORTS; k++) begin
      int unsigned p;
      p = (int'(rr) + k) % PORTS;
      if (!any_req && !req_empty[p]) begin
        sel     = PW'(p);
        any_req = 1'b1;
      end
    end
  end

  l2req_pkt_t r;
  assign r = req_data[sel];

  // ----------------------------------------------------------- read tracking
  typedef struct packed {
    logic [PW-1:0] port;
    logic          src;
    logic [3:0]    nwords;
  } track_t;

  localparam int unsigned TW = (MAX_READS > 1) ? $clog2(MAX_READS) : 1;
  track_t            trk [MAX_READS];
  logic [TW-1:0]     trk_wp, trk_rp;
  logic [TW:0]       trk_cnt;
  logic              trk_push, trk_pop;
  logic [3:0]        word_cnt;

  // ----------------------------------------------------------- lock arbiter
  logic lk_valid, cond_ok;
  lock_arbiter #(.PORTS(PORTS)) u_lock (
    .clk, .rst_n, .op_valid(lk_valid), .op_port(sel), .op_addr(r.addr), .op_rnw(r.rnw),
    .op_cond(r.cond), .cond_ok, .resv_valid);

  // ----------------------------------------------------------- execution
  logic others_inv_room;
  always_comb begin
    others_inv_room = 1'b1;
    for (int p = 0; p < PORTS; p++)
      if (PW'(p) != sel && inv_full[p]) others_inv_room = 1'b0;
  end

  logic do_read, do_write, do_fail;
  always_comb begin
    do_read  = any_req && r.rnw && !mcmd_full && (trk_cnt < (TW+1)'(MAX_READS));
    do_write = any_req && !r.rnw && !wd_empty[sel] && (!r.cond || cond_ok) &&
               !mcmd_full && !mwd_full && others_inv_room && (!r.cond || !cond_full[sel]);
    do_fail  = any_req && !r.rnw && r.cond && !cond_ok && !wd_empty[sel] && !cond_full[sel];
  end

  assign lk_valid     = do_read || do_write || do_fail;
  assign trk_push     = do_read;
  assign mcmd_wr_en   = do_read || do_write;
  assign mcmd_wr_data = '{addr: r.addr, rnw: r.rnw, be: r.be, nwords: r.nwords};
  assign mwd_wr_en    = do_write;
  assign mwd_wr_data  = wd_data[sel];
  assign ev_inv_broadcast = do_write;
  assign ev_cond_fail     = do_fail;

  always_comb begin
    req_pop      = '0;
    wd_pop       = '0;
    inv_wr_en    = '0;
    cond_wr_en   = '0;
    cond_wr_data = '0;
    for (int p = 0; p < PORTS; p++) inv_wr_data[p] = r.addr;
    if (lk_valid) req_pop[sel] = 1'b1;
    if (do_write || do_fail) wd_pop[sel] = 1'b1;
    if (do_write)
      for (int p = 0; p < PORTS; p++)
        if (PW'(p) != sel) inv_wr_en[p] = 1'b1;
    if ((do_write || do_fail) && r.cond) begin
      cond_wr_en[sel]   = 1'b1;
      cond_wr_data[sel] = do_write;
    end
  end

  // ----------------------------------------------------------- return path
  track_t head;
  assign head    = trk[trk_rp];
  assign mrd_pop = !mrd_empty && (trk_cnt != '0) && !rd_full[head.port];
  assign trk_pop = mrd_pop && (word_cnt == head.nwords - 4'd1);

  always_comb begin
    rd_wr_en   = '0;
    for (int p = 0; p < PORTS; p++) rd_wr_data[p] = '{src: head.src, word: mrd_data};
    if (mrd_pop) rd_wr_en[head.port] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr       <= '0;
      trk_wp   <= '0;
      trk_rp   <= '0;
      trk_cnt  <= '0;
      word_cnt <= '0;
      for (int i = 0; i < MAX_READS; i++) trk[i] <= '0;
    end else begin
      if (lk_valid) rr <= (sel == PW'(PORTS - 1)) ? '0 : sel + PW'(1);
      if (trk_push) begin
        trk[trk_wp] <= '{port: sel, src: r.src, nwords: r.nwords};
        trk_wp      <= (trk_wp == TW'(MAX_READS - 1)) ? '0 : trk_wp + TW'(1);
      end
      if (mrd_pop) word_cnt <= trk_pop ? 4'd0 : word_cnt + 4'd1;
      if (trk_pop) trk_rp <= (trk_rp == TW'(MAX_READS - 1)) ? '0 : trk_rp + TW'(1);
      trk_cnt <= trk_cnt + (TW+1)'(trk_push) - (TW+1)'(trk_pop);
    end
  end

  a_no_dup_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({do_read, do_write, do_fail}))
    else $error("l2_arbiter: more than one action in a cycle");

endmodule

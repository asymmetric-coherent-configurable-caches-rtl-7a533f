// l1_arbiter: Level-1 Arbiter of one PolyBlaze core.
//
// Joins the instruction and data cache of a core into one generic port of the
// L2 Arbiter, so that the L2 Arbiter needs one port per core rather than two.
// Requests of both caches are turned into one unified request format: the
// address request goes to the L2 address-request link (with the source bit,
// '1' for data cache and '0' for instruction cache, and the number of words
// to read), the write data of a store goes to the L2 write-data link. Returned
// words carry the source bit back and are steered into the data cache's or the
// instruction cache's data link. Invalidation addresses and conditional-store
// results from the L2 Arbiter are passed on to the data cache. The
// instruction path goes through a stride-1 prefetch unit (prefetch_unit).
//
// Arbitration: the two caches alternate when both have a request ready. At
// most one line read is outstanding per core; data-cache stores are not held
// back by an outstanding read, since the L2 Arbiter keeps the order of each
// port's requests. A request is accepted only when the links it needs have
// room, so nothing is ever dropped.
//
// From the document: the role, the link set, the request format and the
// source bit. This design's choices: alternating priority, one outstanding
// read, prefetch on the instruction path only, the word count field.
// Everything runs on one clock (the arbiter clock); the links are pbml_fifo.
module l1_arbiter
  import pb_pkg::*;
#(
  parameter int unsigned D_LINE_WORDS = 4,
  parameter int unsigned I_LINE_WORDS = 4,
  parameter bit          PREFETCH     = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  // data cache request link (read side)
  input  logic         dreq_empty,
  input  dreq_pkt_t    dreq_data,
  output logic         dreq_pop,
  // instruction cache request link (read side)
  input  logic         ireq_empty,
  input  logic [31:0]  ireq_data,
  output logic         ireq_pop,
  // data cache data / invalidation / conditional links (write side)
  output logic         ddata_wr_en,
  output logic [31:0]  ddata_wr_data,
  input  logic         ddata_full,
  output logic         dinv_wr_en,
  output logic [31:0]  dinv_wr_data,
  input  logic         dinv_full,
  output logic         dcond_wr_en,
  output logic         dcond_wr_data,
  input  logic         dcond_full,
  // instruction cache data link (write side)
  output logic         idata_wr_en,
  output logic [31:0]  idata_wr_data,
  input  logic         idata_full,
  // L2 address request and write data links (write side)
  output logic         l2req_wr_en,
  output l2req_pkt_t   l2req_wr_data,
  input  logic         l2req_full,
  output logic         l2wd_wr_en,
  output logic [31:0]  l2wd_wr_data,
  input  logic         l2wd_full,
  // L2 read data / invalidation / conditional links (read side)
  input  logic         l2rd_empty,
  input  rdata_pkt_t   l2rd_data,
  output logic         l2rd_pop,
  input  logic         l2inv_empty,
  input  logic [31:0]  l2inv_data,
  output logic         l2inv_pop,
  input  logic         l2cond_empty,
  input  logic         l2cond_data,
  output logic         l2cond_pop,
  // prefetch strobes
  output logic         pf_hit,
  output logic         pf_miss
);
  // --------------------------------------------- coherency and SWX forwarding
  assign l2inv_pop     = !l2inv_empty && !dinv_full;
  assign dinv_wr_en    = l2inv_pop;
  assign dinv_wr_data  = l2inv_data;
  assign l2cond_pop    = !l2cond_empty && !dcond_full;
  assign dcond_wr_en   = l2cond_pop;
  assign dcond_wr_data = l2cond_data;

  // ------------------------------------------------------ instruction path
  logic        i_mreq_valid, i_mreq_grant, i_mdata_valid, i_mdata_ready;
  logic [31:0] i_mreq_addr;

  prefetch_unit #(.ENABLE(PREFETCH), .LINE_WORDS(I_LINE_WORDS)) u_pf (
    .clk, .rst_n,
    .ireq_empty, .ireq_addr(ireq_data), .ireq_pop,
    .mreq_valid(i_mreq_valid), .mreq_addr(i_mreq_addr), .mreq_grant(i_mreq_grant),
    .mdata_valid(i_mdata_valid), .mdata_word(l2rd_data.word), .mdata_ready(i_mdata_ready),
    .idata_push(idata_wr_en), .idata_word(idata_wr_data), .idata_full,
    .pf_hit, .pf_miss);

  // ------------------------------------------------------ request arbitration
  logic       rd_busy;     // a line read is outstanding
  logic [3:0] rd_left;     // words still to come for it
  logic       last_was_d;  // alternate between the caches

  logic d_ready, i_ready, grant_d, grant_i;
  assign d_ready = !dreq_empty && !l2req_full &&
                   (dreq_data.rnw ? !rd_busy : !l2wd_full);
  assign i_ready = i_mreq_valid && !l2req_full && !rd_busy;
  assign grant_d = d_ready && (!i_ready || !last_was_d);
  assign grant_i = i_ready && !grant_d;
  assign i_mreq_grant = grant_i;
  assign dreq_pop     = grant_d;

  always_comb begin
    l2req_wr_en   = grant_d || grant_i;
    l2wd_wr_en    = grant_d && !dreq_data.rnw;
    l2wd_wr_data  = dreq_data.wdata;
    if (grant_d)
      l2req_wr_data = '{addr: dreq_data.addr, rnw: dreq_data.rnw, be: dreq_data.be,
                        cond: dreq_data.cond, src: 1'b1,
                        nwords: dreq_data.rnw ? 4'(D_LINE_WORDS) : 4'd1};
    else
      l2req_wr_data = '{addr: i_mreq_addr, rnw: 1'b1, be: 4'hF, cond: 1'b0, src: 1'b0,
                        nwords: 4'(I_LINE_WORDS)};
  end

  // ------------------------------------------------------ returned words
  assign i_mdata_valid = !l2rd_empty && !l2rd_data.src;
  assign ddata_wr_data = l2rd_data.word;
  assign ddata_wr_en   = !l2rd_empty && l2rd_data.src && !ddata_full;
  assign l2rd_pop      = ddata_wr_en || (i_mdata_valid && i_mdata_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy    <= 1'b0;
      rd_left    <= '0;
      last_was_d <= 1'b0;
    end else begin
      if (grant_d || grant_i) last_was_d <= grant_d;
      if ((grant_d && dreq_data.rnw) || grant_i) begin
        rd_busy <= 1'b1;
        rd_left <= grant_d ? 4'(D_LINE_WORDS) : 4'(I_LINE_WORDS);
      end else if (l2rd_pop) begin
        rd_left <= rd_left - 4'd1;
        if (rd_left == 4'd1) rd_busy <= 1'b0;
      end
    end
  end

  a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_busy && ((grant_d && dreq_data.rnw) || grant_i)))
    else $error("l1_arbiter: second read issued while one is outstanding");

endmodule

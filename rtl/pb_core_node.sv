// pb_core_node: the memory side of one PolyBlaze core.
//
// Groups what every core brings to the memory system: its L1 instruction
// cache, its L1 data cache, its L1 Arbiter, and the eleven PolyBlaze Memory
// Links (pbml_fifo) that join them: four between data cache and L1 Arbiter
// (requests, data, invalidation addresses, conditional results), two between
// instruction cache and L1 Arbiter (requests, data) and five between the L1
// Arbiter and the L2 Arbiter (address requests, write data, read data,
// invalidation addresses, conditional results). The caches run on clk_core,
// the L1 Arbiter and the L2 side of the last five links on clk_arb.
//
// Parameters give the shape of each cache, which is what makes cores of one
// system asymmetric. The L2-side link ends are brought out for the L2 Arbiter.
module pb_core_node
  import pb_pkg::*;
#(
  parameter int unsigned D_BYTES      = 4096,
  parameter int unsigned D_LINE_WORDS = 4,
  parameter int unsigned D_WAYS       = 4,
  parameter int unsigned I_BYTES      = 16384,
  parameter int unsigned I_LINE_WORDS = 4,
  parameter int unsigned I_WAYS       = 4,
  parameter bit          PREFETCH     = 1'b1,
  parameter bit          USE_DEBUG    = 1'b1,
  parameter int unsigned LINK_DEPTH_LOG2 = 4
) (
  input  logic        clk_core,
  input  logic        clk_arb,
  input  logic        rst_n,
  // processor side
  input  mb_dreq_t    dreq,
  output mb_dresp_t   dresp,
  input  mb_ireq_t    ireq,
  output mb_iresp_t   iresp,
  output dc_events_t  dc_events,
  output ic_events_t  ic_events,
  output cache_dbg_t  dc_dbg,
  output cache_dbg_t  ic_dbg,
  output logic        pf_hit,
  output logic        pf_miss,
  // L2 Arbiter side of the L1<->L2 links
  output logic        l2_req_empty,
  output l2req_pkt_t  l2_req_data,
  input  logic        l2_req_pop,
  output logic        l2_wd_empty,
  output logic [31:0] l2_wd_data,
  input  logic        l2_wd_pop,
  input  logic        l2_rd_wr_en,
  input  rdata_pkt_t  l2_rd_wr_data,
  output logic        l2_rd_full,
  input  logic        l2_inv_wr_en,
  input  logic [31:0] l2_inv_wr_data,
  output logic        l2_inv_full,
  input  logic        l2_cond_wr_en,
  input  logic        l2_cond_wr_data,
  output logic        l2_cond_full
);
  localparam int unsigned DL = LINK_DEPTH_LOG2;

  // ---- data cache <-> L1 Arbiter links
  logic dq_we, dq_full, dq_re, dq_empty;  dreq_pkt_t dq_wd, dq_rd;
  logic dd_we, dd_full, dd_re, dd_empty;  logic [31:0] dd_wd, dd_rd;
  logic di_we, di_full, di_re, di_empty;  logic [31:0] di_wd, di_rd;
  logic dc_we, dc_full, dc_re, dc_empty;  logic dc_wd, dc_rd;
  // ---- instruction cache <-> L1 Arbiter links
  logic iq_we, iq_full, iq_re, iq_empty;  logic [31:0] iq_wd, iq_rd;
  logic id_we, id_full, id_re, id_empty;  logic [31:0] id_wd, id_rd;
  // ---- L1 Arbiter <-> L2 Arbiter links (L1 side)
  logic rq_we, rq_full;  l2req_pkt_t rq_wd;
  logic wd_we, wd_full;  logic [31:0] wd_wd;
  logic rd_re, rd_empty; rdata_pkt_t rd_rd;
  logic iv_re, iv_empty; logic [31:0] iv_rd;
  logic cr_re, cr_empty; logic cr_rd;

  dcache #(.CACHE_BYTES(D_BYTES), .LINE_WORDS(D_LINE_WORDS), .WAYS(D_WAYS), .USE_DEBUG(USE_DEBUG)) u_dcache (
    .clk(clk_core), .rst_n, .cpu_req(dreq), .cpu_resp(dresp),
    .req_wr_en(dq_we), .req_wr_data(dq_wd), .req_full(dq_full),
    .data_rd_en(dd_re), .data_rd_data(dd_rd), .data_empty(dd_empty),
    .inv_rd_en(di_re), .inv_rd_data(di_rd), .inv_empty(di_empty),
    .cond_rd_en(dc_re), .cond_rd_data(dc_rd), .cond_empty(dc_empty),
    .events(dc_events), .dbg(dc_dbg));

  icache #(.CACHE_BYTES(I_BYTES), .LINE_WORDS(I_LINE_WORDS), .WAYS(I_WAYS), .USE_DEBUG(USE_DEBUG)) u_icache (
    .clk(clk_core), .rst_n, .cpu_req(ireq), .cpu_resp(iresp),
    .req_wr_en(iq_we), .req_wr_data(iq_wd), .req_full(iq_full),
    .data_rd_en(id_re), .data_rd_data(id_rd), .data_empty(id_empty),
    .events(ic_events), .dbg(ic_dbg));

  pbml_fifo #(.WIDTH(DREQ_W), .DEPTH_LOG2(DL)) u_link_dreq (.rst_n,
    .wr_clk(clk_core), .wr_en(dq_we), .wr_data(dq_wd), .wr_full(dq_full),
    .rd_clk(clk_arb),  .rd_en(dq_re), .rd_data(dq_rd), .rd_empty(dq_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) u_link_ddata (.rst_n,
    .wr_clk(clk_arb),  .wr_en(dd_we), .wr_data(dd_wd), .wr_full(dd_full),
    .rd_clk(clk_core), .rd_en(dd_re), .rd_data(dd_rd), .rd_empty(dd_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) u_link_dinv (.rst_n,
    .wr_clk(clk_arb),  .wr_en(di_we), .wr_data(di_wd), .wr_full(di_full),
    .rd_clk(clk_core), .rd_en(di_re), .rd_data(di_rd), .rd_empty(di_empty));
  pbml_fifo #(.WIDTH(1), .DEPTH_LOG2(DL)) u_link_dcond (.rst_n,
    .wr_clk(clk_arb),  .wr_en(dc_we), .wr_data(dc_wd), .wr_full(dc_full),
    .rd_clk(clk_core), .rd_en(dc_re), .rd_data(dc_rd), .rd_empty(dc_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) u_link_ireq (.rst_n,
    .wr_clk(clk_core), .wr_en(iq_we), .wr_data(iq_wd), .wr_full(iq_full),
    .rd_clk(clk_arb),  .rd_en(iq_re), .rd_data(iq_rd), .rd_empty(iq_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) u_link_idata (.rst_n,
    .wr_clk(clk_arb),  .wr_en(id_we), .wr_data(id_wd), .wr_full(id_full),
    .rd_clk(clk_core), .rd_en(id_re), .rd_data(id_rd), .rd_empty(id_empty));

  l1_arbiter #(.D_LINE_WORDS(D_LINE_WORDS), .I_LINE_WORDS(I_LINE_WORDS), .PREFETCH(PREFETCH)) u_l1 (
    .clk(clk_arb), .rst_n,
    .dreq_empty(dq_empty), .dreq_data(dq_rd), .dreq_pop(dq_re),
    .ireq_empty(iq_empty), .ireq_data(iq_rd), .ireq_pop(iq_re),
    .ddata_wr_en(dd_we), .ddata_wr_data(dd_wd), .ddata_full(dd_full),
    .dinv_wr_en(di_we), .dinv_wr_data(di_wd), .dinv_full(di_full),
    .dcond_wr_en(dc_we), .dcond_wr_data(dc_wd), .dcond_full(dc_full),
    .idata_wr_en(id_we), .idata_wr_data(id_wd), .idata_full(id_full),
    .l2req_wr_en(rq_we), .l2req_wr_data(rq_wd), .l2req_full(rq_full),
    .l2wd_wr_en(wd_we), .l2wd_wr_data(wd_wd), .l2wd_full(wd_full),
    .l2rd_empty(rd_empty), .l2rd_data(rd_rd), .l2rd_pop(rd_re),
    .l2inv_empty(iv_empty), .l2inv_data(iv_rd), .l2inv_pop(iv_re),
    .l2cond_empty(cr_empty), .l2cond_data(cr_rd), .l2cond_pop(cr_re),
    .pf_hit, .pf_miss);

  pbml_fifo #(.WIDTH(L2REQ_W), .DEPTH_LOG2(DL)) u_link_l2req (.rst_n,
    .wr_clk(clk_arb), .wr_en(rq_we), .wr_data(rq_wd), .wr_full(rq_full),
    .rd_clk(clk_arb), .rd_en(l2_req_pop), .rd_data(l2_req_data), .rd_empty(l2_req_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) u_link_l2wd (.rst_n,
    .wr_clk(clk_arb), .wr_en(wd_we), .wr_data(wd_wd), .wr_full(wd_full),
    .rd_clk(clk_arb), .rd_en(l2_wd_pop), .rd_data(l2_wd_data), .rd_empty(l2_wd_empty));
  pbml_fifo #(.WIDTH(RDATA_W), .DEPTH_LOG2(DL)) u_link_l2rd (.rst_n,
    .wr_clk(clk_arb), .wr_en(l2_rd_wr_en), .wr_data(l2_rd_wr_data), .wr_full(l2_rd_full),
    .rd_clk(clk_arb), .rd_en(rd_re), .rd_data(rd_rd), .rd_empty(rd_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(DL)) u_link_l2inv (.rst_n,
    .wr_clk(clk_arb), .wr_en(l2_inv_wr_en), .wr_data(l2_inv_wr_data), .wr_full(l2_inv_full),
    .rd_clk(clk_arb), .rd_en(iv_re), .rd_data(iv_rd), .rd_empty(iv_empty));
  pbml_fifo #(.WIDTH(1), .DEPTH_LOG2(DL)) u_link_l2cond (.rst_n,
    .wr_clk(clk_arb), .wr_en(l2_cond_wr_en), .wr_data(l2_cond_wr_data), .wr_full(l2_cond_full),
    .rd_clk(clk_arb), .rd_en(cr_re), .rd_data(cr_rd), .rd_empty(cr_empty));

endmodule

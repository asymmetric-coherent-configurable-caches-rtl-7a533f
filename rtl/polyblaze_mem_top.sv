// polyblaze_mem_top: coherent, asymmetric L1 cache memory system of a PolyBlaze multicore.
//
// N_CORES cores each contribute an L1 instruction cache, an L1 data cache and
// an L1 Arbiter (pb_core_node); the L1 Arbiters share one L2 Arbiter with its
// lock arbiter, which serialises all traffic, broadcasts write invalidations
// and resolves LWX/SWX; a memory interface (npi_interface) passes the traffic
// to the native port of the memory controller. Every connection is a
// PolyBlaze Memory Link (pbml_fifo), so three clock domains can run at their
// own rates: clk_core (caches), clk_arb (L1 and L2 Arbiters) and clk_mem
// (memory interface). The processors and the memory controller are outside:
// their sides are the ports of this module.
//
// The cache shape of each core is a parameter entry, packed per core (entry i
// for core i), so cores can be configured differently. The defaults are the
// asymmetric dual-core system of the application study: 16 kB 4-way LRU
// instruction caches with 4-word lines on both cores; core 0 has a 4 kB 4-way
// LRU data cache and core 1 an 8 kB direct-mapped data cache, both with
// 4-word lines.
//
// Ports: per-core processor request/response bundles (see pb_pkg), per-core
// profiler strobes and debug registers, the memory controller's native port,
// and a few observation signals (prefetch hits, reservations, invalidation
// broadcasts, failed conditional stores). rst_n is asynchronous and common to
// all domains.
module polyblaze_mem_top
  import pb_pkg::*;
#(
  parameter int unsigned N_CORES = 2,
  parameter logic [N_CORES-1:0][31:0] D_BYTES      = {32'd8192, 32'd4096},
  parameter logic [N_CORES-1:0][31:0] D_WAYS       = {32'd1,    32'd4},
  parameter logic [N_CORES-1:0][31:0] D_LINE_WORDS = {32'd4,    32'd4},
  parameter logic [N_CORES-1:0][31:0] I_BYTES      = {32'd16384, 32'd16384},
  parameter logic [N_CORES-1:0][31:0] I_WAYS       = {32'd4,    32'd4},
  parameter logic [N_CORES-1:0][31:0] I_LINE_WORDS = {32'd4,    32'd4},
  parameter bit          PREFETCH  = 1'b1,
  parameter bit          USE_DEBUG = 1'b1,
  parameter int unsigned MAX_READS = 4
) (
  input  logic                     clk_core,
  input  logic                     clk_arb,
  input  logic                     clk_mem,
  input  logic                     rst_n,
  // processor side, one entry per core
  input  mb_dreq_t   [N_CORES-1:0] dreq,
  output mb_dresp_t  [N_CORES-1:0] dresp,
  input  mb_ireq_t   [N_CORES-1:0] ireq,
  output mb_iresp_t  [N_CORES-1:0] iresp,
  output dc_events_t [N_CORES-1:0] dc_events,
  output ic_events_t [N_CORES-1:0] ic_events,
  output cache_dbg_t [N_CORES-1:0] dc_dbg,
  output cache_dbg_t [N_CORES-1:0] ic_dbg,
  output logic       [N_CORES-1:0] pf_hit,
  output logic       [N_CORES-1:0] pf_miss,
  // memory controller native port (clk_mem)
  output logic                     npi_cmd_valid,
  input  logic                     npi_cmd_ready,
  output logic                     npi_cmd_rnw,
  output logic [31:0]              npi_cmd_addr,
  output logic [3:0]               npi_cmd_nwords,
  output logic [3:0]               npi_cmd_be,
  output logic [31:0]              npi_cmd_wdata,
  input  logic                     npi_rd_valid,
  input  logic [31:0]              npi_rd_data,
  input  logic                     npi_rd_last,
  output logic                     npi_rd_ready,
  // observation
  output logic       [N_CORES-1:0] resv_valid,
  output logic                     ev_inv_broadcast,
  output logic                     ev_cond_fail,
  output logic [2:0]               reads_outstanding
);
  logic       [N_CORES-1:0]        req_empty, req_pop, wd_empty, wd_pop;
  l2req_pkt_t [N_CORES-1:0]        req_data;
  logic [N_CORES-1:0][31:0]        wd_data, inv_wr_data;
  logic       [N_CORES-1:0]        rd_wr_en, rd_full, inv_wr_en, inv_full;
  logic       [N_CORES-1:0]        cond_wr_en, cond_wr_data, cond_full;
  rdata_pkt_t [N_CORES-1:0]        rd_wr_data;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    pb_core_node #(
      .D_BYTES(D_BYTES[c]), .D_LINE_WORDS(D_LINE_WORDS[c]), .D_WAYS(D_WAYS[c]),
      .I_BYTES(I_BYTES[c]), .I_LINE_WORDS(I_LINE_WORDS[c]), .I_WAYS(I_WAYS[c]),
      .PREFETCH(PREFETCH), .USE_DEBUG(USE_DEBUG)
    ) u_node (
      .clk_core, .clk_arb, .rst_n,
      .dreq(dreq[c]), .dresp(dresp[c]), .ireq(ireq[c]), .iresp(iresp[c]),
      .dc_events(dc_events[c]), .ic_events(ic_events[c]),
      .dc_dbg(dc_dbg[c]), .ic_dbg(ic_dbg[c]), .pf_hit(pf_hit[c]), .pf_miss(pf_miss[c]),
      .l2_req_empty(req_empty[c]), .l2_req_data(req_data[c]), .l2_req_pop(req_pop[c]),
      .l2_wd_empty(wd_empty[c]), .l2_wd_data(wd_data[c]), .l2_wd_pop(wd_pop[c]),
      .l2_rd_wr_en(rd_wr_en[c]), .l2_rd_wr_data(rd_wr_data[c]), .l2_rd_full(rd_full[c]),
      .l2_inv_wr_en(inv_wr_en[c]), .l2_inv_wr_data(inv_wr_data[c]), .l2_inv_full(inv_full[c]),
      .l2_cond_wr_en(cond_wr_en[c]), .l2_cond_wr_data(cond_wr_data[c]), .l2_cond_full(cond_full[c]));
  end

  // ---- L2 Arbiter <-> memory interface links
  logic       mc_we, mc_full, mc_re, mc_empty;  mcmd_pkt_t mc_wd, mc_rd;
  logic       mw_we, mw_full, mw_re, mw_empty;  logic [31:0] mw_wd, mw_rd;
  logic       mr_we, mr_full, mr_re, mr_empty;  logic [31:0] mr_wd, mr_rd;

  l2_arbiter #(.PORTS(N_CORES), .MAX_READS(MAX_READS)) u_l2 (
    .clk(clk_arb), .rst_n,
    .req_empty, .req_data, .req_pop, .wd_empty, .wd_data, .wd_pop,
    .rd_wr_en, .rd_wr_data, .rd_full, .inv_wr_en, .inv_wr_data, .inv_full,
    .cond_wr_en, .cond_wr_data, .cond_full,
    .mcmd_wr_en(mc_we), .mcmd_wr_data(mc_wd), .mcmd_full(mc_full),
    .mwd_wr_en(mw_we), .mwd_wr_data(mw_wd), .mwd_full(mw_full),
    .mrd_empty(mr_empty), .mrd_data(mr_rd), .mrd_pop(mr_re),
    .resv_valid, .ev_inv_broadcast, .ev_cond_fail);

  pbml_fifo #(.WIDTH(MCMD_W), .DEPTH_LOG2(4)) u_link_mcmd (.rst_n,
    .wr_clk(clk_arb), .wr_en(mc_we), .wr_data(mc_wd), .wr_full(mc_full),
    .rd_clk(clk_mem), .rd_en(mc_re), .rd_data(mc_rd), .rd_empty(mc_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(4)) u_link_mwd (.rst_n,
    .wr_clk(clk_arb), .wr_en(mw_we), .wr_data(mw_wd), .wr_full(mw_full),
    .rd_clk(clk_mem), .rd_en(mw_re), .rd_data(mw_rd), .rd_empty(mw_empty));
  pbml_fifo #(.WIDTH(32), .DEPTH_LOG2(4)) u_link_mrd (.rst_n,
    .wr_clk(clk_mem), .wr_en(mr_we), .wr_data(mr_wd), .wr_full(mr_full),
    .rd_clk(clk_arb), .rd_en(mr_re), .rd_data(mr_rd), .rd_empty(mr_empty));

  npi_interface #(.MAX_READS(MAX_READS)) u_npi (
    .clk(clk_mem), .rst_n,
    .mcmd_empty(mc_empty), .mcmd_data(mc_rd), .mcmd_pop(mc_re),
    .mwd_empty(mw_empty), .mwd_data(mw_rd), .mwd_pop(mw_re),
    .mrd_wr_en(mr_we), .mrd_wr_data(mr_wd), .mrd_full(mr_full),
    .npi_cmd_valid, .npi_cmd_ready, .npi_cmd_rnw, .npi_cmd_addr, .npi_cmd_nwords,
    .npi_cmd_be, .npi_cmd_wdata, .npi_rd_valid, .npi_rd_data, .npi_rd_last, .npi_rd_ready,
    .reads_outstanding);

endmodule

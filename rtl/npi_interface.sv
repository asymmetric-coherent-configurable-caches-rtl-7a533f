// npi_interface: memory interface between the L2 Arbiter and the memory controller.
//
// Takes the serialised requests of the L2 Arbiter from its command and
// write-data links and issues them on a simple FIFO-style native port of the
// memory controller; returned read words are pushed into the read-data link
// back to the L2 Arbiter. The memory controller of the document accepts at
// most four outstanding reads on this port, so the interface counts
// outstanding reads and does not issue a fifth.
//
// Port protocol (this design's own, since the document only names the port):
//   command: npi_cmd_valid/npi_cmd_ready handshake with rnw, addr, nwords, be
//            and, for a write, the write word npi_cmd_wdata (one word per
//            write). Read addresses are aligned down to the start of the
//            nwords-word line (nwords is a power of two), so the words come
//            back first word of the line first, as the caches expect.
//   read data: npi_rd_valid/npi_rd_ready handshake with npi_rd_data and
//            npi_rd_last on the last word of each read.
// Commands are issued in link order, so memory sees writes and reads in the
// order the L2 Arbiter chose. Runs on the memory-side clock.
module npi_interface
  import pb_pkg::*;
#(
  parameter int unsigned MAX_READS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // from L2 Arbiter (read sides of the command and write-data links)
  input  logic        mcmd_empty,
  input  mcmd_pkt_t   mcmd_data,
  output logic        mcmd_pop,
  input  logic        mwd_empty,
  input  logic [31:0] mwd_data,
  output logic        mwd_pop,
  // to L2 Arbiter (write side of the read-data link)
  output logic        mrd_wr_en,
  output logic [31:0] mrd_wr_data,
  input  logic        mrd_full,
  // native port of the memory controller
  output logic        npi_cmd_valid,
  input  logic        npi_cmd_ready,
  output logic        npi_cmd_rnw,
  output logic [31:0] npi_cmd_addr,
  output logic [3:0]  npi_cmd_nwords,
  output logic [3:0]  npi_cmd_be,
  output logic [31:0] npi_cmd_wdata,
  input  logic        npi_rd_valid,
  input  logic [31:0] npi_rd_data,
  input  logic        npi_rd_last,
  output logic        npi_rd_ready,
  output logic [2:0]  reads_outstanding
);
  logic [2:0]  outstanding;
  logic [31:0] line_mask;
  logic        cmd_go, rd_done;

  assign line_mask = ~((32'(mcmd_data.nwords) << 2) - 32'd1);

  assign npi_cmd_valid  = !mcmd_empty &&
                          (mcmd_data.rnw ? (outstanding < 3'(MAX_READS)) : !mwd_empty);
  assign npi_cmd_rnw    = mcmd_data.rnw;
  assign npi_cmd_addr   = mcmd_data.rnw ? (mcmd_data.addr & line_mask) : mcmd_data.addr;
  assign npi_cmd_nwords = mcmd_data.nwords;
  assign npi_cmd_be     = mcmd_data.be;
  assign npi_cmd_wdata  = mwd_data;

  assign cmd_go   = npi_cmd_valid && npi_cmd_ready;
  assign mcmd_pop = cmd_go;
  assign mwd_pop  = cmd_go && !mcmd_data.rnw;

  assign npi_rd_ready = !mrd_full;
  assign mrd_wr_en    = npi_rd_valid && !mrd_full;
  assign mrd_wr_data  = npi_rd_data;
  assign rd_done      = mrd_wr_en && npi_rd_last;

  assign reads_outstanding = outstanding;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else outstanding <= outstanding + 3'(cmd_go && mcmd_data.rnw) - 3'(rd_done);
  end

  a_max_reads: assert property (@(posedge clk) disable iff (!rst_n)
    outstanding <= 3'(MAX_READS))
    else $error("npi_interface: too many outstanding reads");

endmodule

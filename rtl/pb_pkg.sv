// pb_pkg: types shared by the PolyBlaze coherent L1 cache memory system.
//
// The memory system moves packets through PolyBlaze Memory Links (PBML), which
// are FIFOs. This package defines the packet formats of those links, the
// processor-side request/response bundles of the two L1 caches, and the event
// strobes the caches offer to an external hardware profiler (the ABACUS port).
//
// Taken from the document: the data-cache request packet (32-bit address, one
// read/write bit with '1' meaning read, 32-bit write data, four byte enables and
// one conditional bit), the one-bit source tag the L1 Arbiter adds ('1' data
// cache, '0' instruction cache), the 32-bit invalidation packet and the one-bit
// conditional-store result. Design choices: the word count carried by the
// unified L1->L2 request (the line length of the requesting cache), the source
// bit echoed with every returned word, and the exact processor-side signals,
// including the 8-bit process ID and translated address of an instruction fetch.
package pb_pkg;

  // ---------------------------------------------------------------- PBML packets
  // Data cache -> L1 Arbiter request queue entry (70 bits).
  typedef struct packed {
    logic [31:0] addr;
    logic        rnw;    // 1 = read, 0 = write
    logic [31:0] wdata;
    logic [3:0]  be;
    logic        cond;   // 1 = conditional (LWX / SWX)
  } dreq_pkt_t;

  // L1 Arbiter -> L2 Arbiter address request queue entry. The write data of a
  // write request travels in a separate write-data queue.
  typedef struct packed {
    logic [31:0] addr;
    logic        rnw;
    logic [3:0]  be;
    logic        cond;
    logic        src;    // 1 = data cache, 0 = instruction cache
    logic [3:0]  nwords; // words to read (line length); 1 for writes
  } l2req_pkt_t;

  // L2 Arbiter -> L1 Arbiter read data queue entry: one word plus the source tag.
  typedef struct packed {
    logic        src;
    logic [31:0] word;
  } rdata_pkt_t;

  // L2 Arbiter -> memory interface command queue entry.
  typedef struct packed {
    logic [31:0] addr;
    logic        rnw;
    logic [3:0]  be;
    logic [3:0]  nwords;
  } mcmd_pkt_t;

  localparam int unsigned DREQ_W  = $bits(dreq_pkt_t);
  localparam int unsigned L2REQ_W = $bits(l2req_pkt_t);
  localparam int unsigned RDATA_W = $bits(rdata_pkt_t);
  localparam int unsigned MCMD_W  = $bits(mcmd_pkt_t);

  // -------------------------------------------------------- processor interfaces
  // Data cache request from the processor. The processor holds a request
  // stable until the cache answers with ack. wdc is the WDC cache-line
  // invalidate operation; cond marks LWX (read) and SWX (write).
  typedef struct packed {
    logic        req;
    logic        we;
    logic        cond;
    logic        wdc;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
  } mb_dreq_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
    logic        cond_ok;  // result of an SWX, valid with its ack
  } mb_dresp_t;

  // Instruction cache request: a fetch, or a WIC line invalidate. addr is the
  // fetch address as issued (virtual when virt is set); pid is the process ID
  // of a virtual fetch; paddr is its translated address, used on a miss.
  localparam int unsigned PID_W = 8;
  typedef struct packed {
    logic             req;
    logic             wic;
    logic             virt;
    logic [PID_W-1:0] pid;
    logic [31:0]      addr;
    logic [31:0]      paddr;
  } mb_ireq_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] data;
  } mb_iresp_t;

  // ---------------------------------------------------------- profiler strobes
  // One-cycle strobes, one per event, for an external profiler to count.
  typedef struct packed {
    logic rd_req;
    logic rd_hit;
    logic rd_miss;
    logic wr_req;
    logic wr_hit;
    logic wr_miss;
    logic inv_pkt;  // coherency packet consumed
    logic inv_hit;  // coherency packet that invalidated a line
  } dc_events_t;

  typedef struct packed {
    logic rd_req;
    logic rd_hit;
    logic rd_miss;
  } ic_events_t;

  // Debug view of one cache (hardware counters and a check-sum register).
  typedef struct packed {
    logic [31:0] miss_count;
    logic [31:0] last_latency; // cycles from line request to first fill word
    logic [31:0] checksum;     // running sum of all fill words
  } cache_dbg_t;

endpackage

// prefetch_unit: stride-1 line prefetcher on the instruction path of the L1 Arbiter.
//
// After every instruction-cache line read (line L) the unit requests the next
// line (L+1) and keeps it in a one-line buffer. If the next instruction-cache
// request is for the buffered line, the line is returned from the buffer
// without a memory access and the line after it is prefetched. Any other
// request drops the buffer, goes to memory, and is followed by a prefetch of
// its own next line. This is the simplest (stride-1) prefetcher the document
// describes; it helps most for instruction fetch, which is mostly sequential.
//
// The unit owns the whole instruction-side traffic of the L1 Arbiter: it pops
// the instruction request link, raises line reads towards the arbiter
// (mreq_valid/mreq_addr, accepted by mreq_grant), receives the returned words
// (mdata_valid with mdata_ready), and pushes words into the instruction data
// link (idata_push, held off by idata_full). It keeps at most one line read
// outstanding. With ENABLE = 0 it only forwards requests and data. Returned
// words arrive first word of the line first.
//
// Design choices: one line of buffer, prefetch only on the instruction path
// (a data-side prefetch buffer would also need coherency invalidation, which
// the document does not describe), a request waits while a prefetch is in
// flight and is then checked against the buffer.
module prefetch_unit #(
  parameter bit          ENABLE     = 1'b1,
  parameter int unsigned LINE_WORDS = 4,
  localparam int unsigned WOFF      = $clog2(LINE_WORDS),
  localparam int unsigned LW        = 30 - WOFF          // line-number width
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction request link (read side)
  input  logic        ireq_empty,
  input  logic [31:0] ireq_addr,
  output logic        ireq_pop,
  // line reads towards the L2 Arbiter
  output logic        mreq_valid,
  output logic [31:0] mreq_addr,
  input  logic        mreq_grant,
  // words returned for those reads
  input  logic        mdata_valid,
  input  logic [31:0] mdata_word,
  output logic        mdata_ready,
  // instruction data link (write side)
  output logic        idata_push,
  output logic [31:0] idata_word,
  input  logic        idata_full,
  // strobes: request served from the buffer / request that went to memory
  output logic        pf_hit,
  output logic        pf_miss
);
  typedef enum logic [2:0] {P_IDLE, P_DEM_REQ, P_DEM_DATA, P_SERVE, P_PF_REQ, P_PF_DATA} pstate_t;
  pstate_t state;

  logic [31:0]     buf_words [LINE_WORDS];
  logic [LW-1:0]   buf_line, dem_line, pf_line;
  logic            buf_valid;
  logic [WOFF-1:0] cnt;
  logic [31:0]     dem_addr;
  logic [LW-1:0]   req_line;
  logic            last_word;

  assign req_line  = ireq_addr[31:2+WOFF];
  assign dem_line  = dem_addr[31:2+WOFF];
  assign last_word = (cnt == WOFF'(LINE_WORDS - 1));

  always_comb begin
    ireq_pop    = 1'b0;
    mreq_valid  = 1'b0;
    mreq_addr   = dem_addr;
    mdata_ready = 1'b0;
    idata_push  = 1'b0;
    idata_word  = mdata_word;
    pf_hit      = 1'b0;
    pf_miss     = 1'b0;
    case (state)
      P_IDLE: if (!ireq_empty) begin
        ireq_pop = 1'b1;
        if (ENABLE && buf_valid && buf_line == req_line) pf_hit  = 1'b1;
        else                                              pf_miss = 1'b1;
      end
      P_DEM_REQ: mreq_valid = 1'b1;
      P_DEM_DATA: begin
        mdata_ready = !idata_full;
        idata_push  = mdata_valid && !idata_full;
      end
      P_SERVE: begin
        idata_push = !idata_full;
        idata_word = buf_words[cnt];
      end
      P_PF_REQ: begin
        mreq_valid = 1'b1;
        mreq_addr  = {pf_line, {(WOFF+2){1'b0}}};
      end
      P_PF_DATA: mdata_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      buf_valid <= 1'b0;
      buf_line  <= '0;
      pf_line   <= '0;
      dem_addr  <= '0;
      cnt       <= '0;
      for (int i = 0; i < LINE_WORDS; i++) buf_words[i] <= '0;
    end else begin
      case (state)
        P_IDLE: if (!ireq_empty) begin
          cnt <= '0;
          if (ENABLE && buf_valid && buf_line == req_line) begin
            state <= P_SERVE;
          end else begin
            buf_valid <= 1'b0;
            dem_addr  <= ireq_addr;
            state     <= P_DEM_REQ;
          end
        end
        P_DEM_REQ: if (mreq_grant) state <= P_DEM_DATA;
        P_DEM_DATA: if (mdata_valid && !idata_full) begin
          cnt <= cnt + WOFF'(1);
          if (last_word) begin
            pf_line <= dem_line + LW'(1);
            state   <= ENABLE ? P_PF_REQ : P_IDLE;
          end
        end
        P_SERVE: if (!idata_full) begin
          cnt <= cnt + WOFF'(1);
          if (last_word) begin
            buf_valid <= 1'b0;
            pf_line   <= buf_line + LW'(1);
            state     <= P_PF_REQ;
          end
        end
        P_PF_REQ: if (mreq_grant) begin
          cnt   <= '0;
          state <= P_PF_DATA;
        end
        P_PF_DATA: if (mdata_valid) begin
          buf_words[cnt] <= mdata_word;
          cnt            <= cnt + WOFF'(1);
          if (last_word) begin
            buf_valid <= 1'b1;
            buf_line  <= pf_line;
            state     <= P_IDLE;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule

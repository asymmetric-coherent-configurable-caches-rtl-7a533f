// mpmc_model: behavioural model of the memory controller's native port.
// Not synthesizable; used by testbenches only. It accepts up to QDEPTH
// commands (reads and writes) and executes them strictly in order. A write
// updates memory when it reaches the head of the queue. A read returns its
// nwords words, from the line-aligned address given, one per cycle while
// npi_rd_ready is high, starting no earlier than LATENCY cycles after it
// was accepted; npi_rd_last marks its last word. Memory holds MEM_WORDS words;
// word i starts as init_word(i).
module mpmc_model #(
  parameter int unsigned MEM_WORDS = 65536,
  parameter int unsigned LATENCY   = 10,
  parameter int unsigned QDEPTH    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npi_cmd_valid,
  output logic        npi_cmd_ready,
  input  logic        npi_cmd_rnw,
  input  logic [31:0] npi_cmd_addr,
  input  logic [3:0]  npi_cmd_nwords,
  input  logic [3:0]  npi_cmd_be,
  input  logic [31:0] npi_cmd_wdata,
  output logic        npi_rd_valid,
  output logic [31:0] npi_rd_data,
  output logic        npi_rd_last,
  input  logic        npi_rd_ready
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  function automatic logic [31:0] init_word(input int unsigned i);
    return (i * 32'h0001_0001) ^ 32'hC0DE_0000;
  endfunction

  logic [31:0] mem [MEM_WORDS];
  typedef struct { logic rnw; logic [31:0] addr; logic [3:0] nwords; logic [3:0] be;
                   logic [31:0] wdata; longint t; } cmd_t;
  cmd_t q [$];
  longint cyc = 0;
  int unsigned word_idx = 0;
  int unsigned n_reads = 0, n_writes = 0;

  initial begin
    for (int unsigned i = 0; i < MEM_WORDS; i++) mem[i] = init_word(i);
    npi_cmd_ready = 1'b0; npi_rd_valid = 1'b0; npi_rd_data = '0; npi_rd_last = 1'b0;
  end

  function automatic logic [31:0] peek(input logic [31:0] byte_addr);
    return mem[byte_addr[AW+1:2]];
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      q = {};
      word_idx = 0;
    end else begin
      cyc++;
      // word delivered in the cycle that ends now
      if (npi_rd_valid && npi_rd_ready) begin
        word_idx++;
        if (word_idx == int'(q[0].nwords)) begin
          void'(q.pop_front());
          word_idx = 0;
          n_reads++;
        end
      end
      if (npi_cmd_valid && npi_cmd_ready)
        q.push_back('{rnw: npi_cmd_rnw, addr: npi_cmd_addr, nwords: npi_cmd_nwords, be: npi_cmd_be,
                      wdata: npi_cmd_wdata, t: cyc});
      // writes at the head take effect in order
      while (q.size() > 0 && !q[0].rnw) begin
        for (int b = 0; b < 4; b++)
          if (q[0].be[b]) mem[q[0].addr[AW+1:2]][8*b +: 8] = q[0].wdata[8*b +: 8];
        void'(q.pop_front());
        n_writes++;
      end
    end
    npi_cmd_ready <= rst_n && (q.size() < int'(QDEPTH));
    if (rst_n && q.size() > 0 && q[0].rnw && cyc >= q[0].t + longint'(LATENCY)) begin
      npi_rd_valid <= 1'b1;
      npi_rd_data  <= mem[AW'(q[0].addr[AW+1:2] + AW'(word_idx))];
      npi_rd_last  <= (word_idx == int'(q[0].nwords) - 1);
    end else begin
      npi_rd_valid <= 1'b0;
      npi_rd_last  <= 1'b0;
    end
  end
endmodule

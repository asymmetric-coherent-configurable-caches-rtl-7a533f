// data_bank: data memory of a PolyBlaze L1 cache.
//
// One 32-bit word array per way, SETS*LINE_WORDS words deep, addressed by
// {set, word-in-line}. The read port returns the addressed word of every way
// so the cache can select the hitting way; the write port writes one way with
// per-byte enables (stores and line fills). LUT-style memory with an
// asynchronous read, so a hit returns its data in the request cycle; the
// document allows either block RAM or LUTs.
module data_bank #(
  parameter int unsigned SETS       = 64,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_WORDS = 4,
  localparam int unsigned AW = $clog2(SETS * LINE_WORDS),
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                    clk,
  input  logic [AW-1:0]           rd_addr,
  output logic [WAYS-1:0][31:0]   rd_words,
  input  logic                    we,
  input  logic [WW-1:0]           wr_way,
  input  logic [AW-1:0]           wr_addr,
  input  logic [3:0]              wr_be,
  input  logic [31:0]             wr_data
);
  localparam int unsigned DEPTH = SETS * LINE_WORDS;
  logic [31:0] mem [WAYS][DEPTH];

  always_comb begin
    for (int w = 0; w < WAYS; w++) rd_words[w] = mem[w][rd_addr];
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) mem[wr_way][wr_addr][8*b +: 8] <= wr_data[8*b +: 8];
    end
  end
endmodule

// tag_bank: tag memory of a PolyBlaze L1 cache, one tag per way per set.
//
// Holds the tag part of the address of each cached line. The valid bits live
// in the separate valid_bits bank. The document lets a tag bank use block RAM
// or LUTs; this model is a LUT-style memory array with asynchronous reads, so
// a lookup and its tag compare finish in the cycle the address is presented.
//
// Interface: two read ports (a: processor lookups, b: coherency lookups), each
// returning the tags of all WAYS for one set; one write port writing one way
// of one set at the clock edge.
module tag_bank #(
  parameter int unsigned SETS  = 64,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAG_W = 22,
  localparam int unsigned SW   = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WW   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                       clk,
  input  logic [SW-1:0]              rd_a_set,
  output logic [WAYS-1:0][TAG_W-1:0] rd_a_tags,
  input  logic [SW-1:0]              rd_b_set,
  output logic [WAYS-1:0][TAG_W-1:0] rd_b_tags,
  input  logic                       we,
  input  logic [SW-1:0]              wr_set,
  input  logic [WW-1:0]              wr_way,
  input  logic [TAG_W-1:0]           wr_tag
);
  logic [TAG_W-1:0] mem [WAYS][SETS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      rd_a_tags[w] = mem[w][rd_a_set];
      rd_b_tags[w] = mem[w][rd_b_set];
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_way][wr_set] <= wr_tag;
  end
endmodule

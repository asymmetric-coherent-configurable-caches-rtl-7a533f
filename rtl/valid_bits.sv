// valid_bits: the separate valid-bit bank of a PolyBlaze L1 cache.
//
// The document moves the valid bits out of the tag memory into a bank of their
// own, so that all logic that reads or changes them (hit detection, fills,
// WDC/WIC invalidations, coherency invalidations and the replacement policy)
// sits in one place. They are held in flip-flops, one bit per way per set,
// cleared by reset, which is how the document explains the extra registers of
// the PolyBlaze caches.
//
// Interface: two combinational read ports (rd_a_set, rd_b_set) each return the
// WAYS valid bits of one set. set_en marks one way valid (a completed line
// fill). clr_a_en / clr_b_en clear the ways of a mask in one set; port a is
// used by the processor side (WDC/WIC, forced LWX miss), port b by the
// coherency handler. All writes take effect at the next clock edge; if a set
// and a clear hit the same bit in one cycle, the clear wins.
module valid_bits #(
  parameter int unsigned SETS = 64,
  parameter int unsigned WAYS = 4,
  localparam int unsigned SW  = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SW-1:0]   rd_a_set,
  output logic [WAYS-1:0] rd_a_valid,
  input  logic [SW-1:0]   rd_b_set,
  output logic [WAYS-1:0] rd_b_valid,
  input  logic            set_en,
  input  logic [SW-1:0]   set_set,
  input  logic [WAYS-1:0] set_way_oh,
  input  logic            clr_a_en,
  input  logic [SW-1:0]   clr_a_set,
  input  logic [WAYS-1:0] clr_a_mask,
  input  logic            clr_b_en,
  input  logic [SW-1:0]   clr_b_set,
  input  logic [WAYS-1:0] clr_b_mask
);
  logic [WAYS-1:0] v [SETS];

  assign rd_a_valid = v[rd_a_set];
  assign rd_b_valid = v[rd_b_set];

  logic [WAYS-1:0] v_next [SETS];

  always_comb begin
    for (int s = 0; s < SETS; s++) begin
      v_next[s] = v[s];
      if (set_en   && set_set   == SW'(s)) v_next[s] = v_next[s] | set_way_oh;
      if (clr_a_en && clr_a_set == SW'(s)) v_next[s] = v_next[s] & ~clr_a_mask;
      if (clr_b_en && clr_b_set == SW'(s)) v_next[s] = v_next[s] & ~clr_b_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) v[s] <= '0;
    end else begin
      for (int s = 0; s < SETS; s++) v[s] <= v_next[s];
    end
  end
endmodule

// lru_policy: replacement policy module of a PolyBlaze L1 cache.
//
// PolyBlaze takes the replacement decision out of the cache control logic into
// a module of its own, so that caches of different cores can use different
// policies. The document implements direct-mapped and LRU placement, and
// treats direct-mapped as the one-way case of LRU; so does this module:
// with WAYS = 1 the victim is always way 0 and no state is kept.
//
// How it works: each way of each set has an age of log2(WAYS) bits; the ages
// of a set are always a permutation of 0..WAYS-1. Touching a way (a hit or a
// completed fill) makes its age 0 and ages by one every way that was younger
// than it. The victim of a set is its first invalid way if there is one (the
// module reads the valid bits, as the document says it may), otherwise the way
// with the largest age, i.e. the least recently used one.
//
// Interface: lookup_set/lookup_valid -> victim (combinational); touch_en,
// touch_set, touch_way update the ages at the clock edge. Reset sets the ages
// of every set to 0,1,..,WAYS-1.
module lru_policy #(
  parameter int unsigned SETS = 64,
  parameter int unsigned WAYS = 4,
  localparam int unsigned SW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SW-1:0]   lookup_set,
  input  logic [WAYS-1:0] lookup_valid,
  output logic [WW-1:0]   victim,
  input  logic            touch_en,
  input  logic [SW-1:0]   touch_set,
  input  logic [WW-1:0]   touch_way
);
  if (WAYS == 1) begin : g_direct
    assign victim = '0;
  end else begin : g_lru
    logic [WW-1:0] age [SETS][WAYS];

    always_comb begin
      logic found;
      victim = '0;
      found  = 1'b0;
      for (int w = 0; w < WAYS; w++) begin
        if (!found && !lookup_valid[w]) begin
          victim = WW'(w);
          found  = 1'b1;
        end
      end
      for (int w = 0; w < WAYS; w++) begin
        if (!found && age[lookup_set][w] == WW'(WAYS - 1)) begin
          victim = WW'(w);
          found  = 1'b1;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++) age[s][w] <= WW'(w);
      end else if (touch_en) begin
        for (int w = 0; w < WAYS; w++) begin
          if (WW'(w) == touch_way)
            age[touch_set][w] <= '0;
          else if (age[touch_set][w] < age[touch_set][touch_way])
            age[touch_set][w] <= age[touch_set][w] + WW'(1);
        end
      end
    end
  end
endmodule

// cache_debug: optional debug counters of a PolyBlaze L1 cache.
//
// The document embeds debug logic in both caches (hardware counters and
// check-sum registers that a logic analyser can watch, for example to measure
// memory latency) and removes it when the USE_DEBUG parameter is 0. Which
// counters exist is this design's choice: the number of line requests sent,
// the latency in cache clock cycles from the latest line request to its first
// returned word, and a running 32-bit sum of all returned fill words.
//
// Interface: miss_start pulses when a line request is pushed into the request
// link; fill_valid/fill_word mark each returned word and fill_first the first
// word of a line. With USE_DEBUG = 0 the outputs are zero and no registers are
// built.
module cache_debug
  import pb_pkg::*;
#(
  parameter bit USE_DEBUG = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       miss_start,
  input  logic       fill_valid,
  input  logic       fill_first,
  input  logic [31:0] fill_word,
  output cache_dbg_t dbg
);
  if (USE_DEBUG) begin : g_dbg
    logic [31:0] timer;
    logic        timing;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dbg    <= '0;
        timer  <= '0;
        timing <= 1'b0;
      end else begin
        if (miss_start) begin
          dbg.miss_count <= dbg.miss_count + 32'd1;
          timer          <= 32'd1;
          timing         <= 1'b1;
        end else if (timing) begin
          timer <= timer + 32'd1;
        end
        if (fill_valid) begin
          dbg.checksum <= dbg.checksum + fill_word;
          if (fill_first && timing) begin
            dbg.last_latency <= timer;
            timing           <= 1'b0;
          end
        end
      end
    end
  end else begin : g_nodbg
    assign dbg = '0;
  end
endmodule

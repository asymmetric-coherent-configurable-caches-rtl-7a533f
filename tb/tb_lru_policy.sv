// tb_lru_policy: random touches on a 4-way LRU; the testbench keeps its own
// recency list per set (most recent first) and checks that the victim is the
// first invalid way, or the last way of the list when all are valid.
module tb_lru_policy;
  localparam int SETS = 8, WAYS = 4, SW = 3, WW = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [SW-1:0] lookup_set, touch_set;
  logic [WAYS-1:0] lookup_valid;
  logic [WW-1:0] victim, touch_way;
  logic touch_en;
  int order [SETS][$];
  int checks = 0, failures = 0;

  lru_policy #(.SETS(SETS), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    touch_en = 1'b0; touch_set = '0; touch_way = '0; lookup_set = '0; lookup_valid = '1;
    // after reset way w has age w: recency order 0,1,2,3 (3 least recent)
    for (int s = 0; s < SETS; s++) begin
      order[s] = {};
      for (int w = 0; w < WAYS; w++) order[s].push_back(w);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int exp;
      @(negedge clk);
      lookup_set   = SW'($urandom);
      lookup_valid = (($urandom % 4) == 0) ? WAYS'($urandom) : '1;
      exp = -1;
      for (int w = 0; w < WAYS; w++) if (exp < 0 && !lookup_valid[w]) exp = w;
      if (exp < 0) exp = order[lookup_set][WAYS-1];
      #1;
      checks++;
      if (int'(victim) != exp) begin
        failures++; $display("FAIL: set %0d valid %b victim %0d expected %0d", lookup_set, lookup_valid, victim, exp);
      end
      touch_en = ($urandom % 2) == 0; touch_set = SW'($urandom); touch_way = WW'($urandom);
      @(posedge clk);
      if (touch_en) begin
        foreach (order[touch_set][k]) if (order[touch_set][k] == int'(touch_way)) begin
          order[touch_set].delete(k);
          break;
        end
        order[touch_set].push_front(int'(touch_way));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

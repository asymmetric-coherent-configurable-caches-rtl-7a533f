// tb_cache_debug: issues line requests with known gaps before the first fill
// word and checks the request counter, the measured latency and the check sum.
module tb_cache_debug;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic miss_start = 1'b0, fill_valid = 1'b0, fill_first = 1'b0;
  logic [31:0] fill_word = '0;
  cache_dbg_t dbg;
  int checks = 0, failures = 0;
  logic [31:0] sum = 0;

  cache_debug #(.USE_DEBUG(1'b1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= 5; n++) begin
      int gap;
      gap = 3 + 7 * n;
      @(negedge clk); miss_start = 1'b1;
      @(negedge clk); miss_start = 1'b0;
      repeat (gap - 1) @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        fill_valid = 1'b1; fill_first = (w == 0); fill_word = $urandom;
        sum += fill_word;
        @(negedge clk);
      end
      fill_valid = 1'b0; fill_first = 1'b0;
      check(dbg.miss_count == 32'(n), "request count");
      check(dbg.last_latency == 32'(gap), $sformatf("latency %0d expected %0d", dbg.last_latency, gap));
      check(dbg.checksum == sum, "check sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

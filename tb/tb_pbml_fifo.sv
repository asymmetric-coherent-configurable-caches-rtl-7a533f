// tb_pbml_fifo: self-checking test of the dual-clock PBML FIFO.
// Part 1 uses equal clocks and checks the write-to-visible latency
// (SYNC_STAGES read edges) and the full flag at 16 entries. Part 2 runs
// random pushes and pops with unrelated clock periods and compares every
// popped word with a queue kept by the testbench.
module tb_pbml_fifo;
  localparam int W = 16;
  logic rst_n = 1'b0;
  logic wclk = 1'b0, rclk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, wr_full, rd_empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int wper = 5, rper = 5;
  logic [W-1:0] model [$];

  pbml_fifo #(.WIDTH(W), .DEPTH_LOG2(4)) dut (.*, .wr_clk(wclk), .rd_clk(rclk));

  // half periods of 3, 5 or 7 time units
  always begin
    case (wper) 3: #3; 7: #7; default: #5; endcase
    wclk = ~wclk;
  end
  always begin
    case (rper) 3: #3; 7: #7; default: #5; endcase
    rclk = ~rclk;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  int pushed = 0, popped = 0;
  bit wdone = 1'b0;
  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1'b1;
    @(posedge wclk);
    check(rd_empty && !wr_full, "empty after reset");
    // ---- latency: push one entry, count read edges until visible
    @(negedge wclk); wr_en = 1'b1; wr_data = 16'hBEEF;
    @(posedge wclk); #1 wr_en = 1'b0;
    lat = 0;
    while (rd_empty) begin @(posedge rclk); #1 lat++; end
    check(lat == 2, $sformatf("visible after %0d read edges (expected 2)", lat));
    check(rd_data == 16'hBEEF, "head data");
    @(negedge rclk); rd_en = 1'b1; @(posedge rclk); #1 rd_en = 1'b0;
    repeat (4) @(posedge rclk);
    check(rd_empty, "empty after pop");
    // ---- fill to full
    for (int i = 0; i < 16; i++) begin
      @(negedge wclk); check(!wr_full, "not full before 16"); wr_en = 1'b1; wr_data = W'(i);
    end
    @(negedge wclk); wr_en = 1'b0;
    check(wr_full, "full after 16 entries");
    for (int i = 0; i < 16; i++) begin
      @(negedge rclk);
      while (rd_empty) @(negedge rclk);
      check(rd_data == W'(i), "drain order");
      rd_en = 1'b1; @(posedge rclk); #1 rd_en = 1'b0;
    end
    // ---- random traffic with different clocks
    wper = 3; rper = 7;
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge wclk);
          wr_en = 1'b0;
          if (($urandom % 3) != 0 && !wr_full) begin
            wr_en = 1'b1; wr_data = W'($urandom);
            model.push_back(wr_data);
            pushed++;
          end
        end
        @(negedge wclk); wr_en = 1'b0;
        wdone = 1'b1;
      end
      begin
        while (!(wdone && model.size() == 0)) begin
          @(negedge rclk);
          rd_en = 1'b0;
          if (($urandom % 2) == 0 && !rd_empty) begin
            check(model.size() > 0 && rd_data == model[0], "random order/data");
            void'(model.pop_front());
            rd_en = 1'b1; popped++;
          end
        end
        @(negedge rclk); rd_en = 1'b0;
      end
    join
    repeat (6) @(posedge rclk);
    check(rd_empty, "empty at end");
    check(pushed > 80, $sformatf("random phase pushed %0d words", pushed));
    check(model.size() == 0, $sformatf("all pushed words popped (%0d left)", model.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

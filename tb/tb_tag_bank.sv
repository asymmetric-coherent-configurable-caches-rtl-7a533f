// tb_tag_bank: writes random tags into random ways and sets and reads them
// back through both read ports, comparing with a model.
module tb_tag_bank;
  localparam int SETS = 16, WAYS = 2, TW = 20, SW = 4;
  logic clk = 1'b0;
  logic [SW-1:0] rd_a_set, rd_b_set, wr_set;
  logic [WAYS-1:0][TW-1:0] rd_a_tags, rd_b_tags;
  logic we;
  logic [0:0] wr_way;
  logic [TW-1:0] wr_tag;
  logic [TW-1:0] model [WAYS][SETS];
  int checks = 0, failures = 0;

  tag_bank #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 1'b0; rd_a_set = '0; rd_b_set = '0; wr_set = '0; wr_way = '0; wr_tag = '0;
    // initialise every entry
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin
        @(negedge clk); we = 1'b1; wr_way = 1'(w); wr_set = SW'(s); wr_tag = TW'($urandom);
        model[w][s] = wr_tag;
      end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = ($urandom % 2) == 0; wr_way = 1'($urandom); wr_set = SW'($urandom); wr_tag = TW'($urandom);
      rd_a_set = SW'($urandom); rd_b_set = SW'($urandom);
      #1;
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (rd_a_tags[w] != model[w][rd_a_set] || rd_b_tags[w] != model[w][rd_b_set]) begin
          failures++; $display("FAIL: way %0d", w);
        end
      end
      @(posedge clk);
      if (we) model[wr_way][wr_set] = wr_tag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

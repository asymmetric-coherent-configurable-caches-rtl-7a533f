// tb_data_bank: byte-enabled writes into random ways and words, read back
// for all ways and compared with a model.
module tb_data_bank;
  localparam int SETS = 8, WAYS = 2, LW = 4, AW = 5;
  logic clk = 1'b0;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [WAYS-1:0][31:0] rd_words;
  logic we;
  logic [0:0] wr_way;
  logic [3:0] wr_be;
  logic [31:0] wr_data;
  logic [31:0] model [WAYS][SETS*LW];
  int checks = 0, failures = 0;

  data_bank #(.SETS(SETS), .WAYS(WAYS), .LINE_WORDS(LW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 1'b0; rd_addr = '0; wr_addr = '0; wr_way = '0; wr_be = '0; wr_data = '0;
    for (int w = 0; w < WAYS; w++)
      for (int a = 0; a < SETS*LW; a++) begin
        @(negedge clk); we = 1'b1; wr_way = 1'(w); wr_addr = AW'(a); wr_be = 4'hF; wr_data = $urandom;
        model[w][a] = wr_data;
      end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = ($urandom % 2) == 0; wr_way = 1'($urandom); wr_addr = AW'($urandom); wr_be = 4'($urandom);
      wr_data = $urandom; rd_addr = AW'($urandom);
      #1;
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (rd_words[w] != model[w][rd_addr]) begin failures++; $display("FAIL: way %0d addr %0d", w, rd_addr); end
      end
      @(posedge clk);
      if (we) for (int b = 0; b < 4; b++) if (wr_be[b]) model[wr_way][wr_addr][8*b +: 8] = wr_data[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

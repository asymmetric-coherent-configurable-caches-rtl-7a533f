// tb_valid_bits: random set/clear traffic on the valid-bit bank, compared
// every cycle with a model kept in the testbench (clears win over sets).
module tb_valid_bits;
  localparam int SETS = 16, WAYS = 4, SW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [SW-1:0] rd_a_set, rd_b_set, set_set, clr_a_set, clr_b_set;
  logic [WAYS-1:0] rd_a_valid, rd_b_valid, set_way_oh, clr_a_mask, clr_b_mask;
  logic set_en, clr_a_en, clr_b_en;
  logic [WAYS-1:0] model [SETS];
  int checks = 0, failures = 0;

  valid_bits #(.SETS(SETS), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    {set_en, clr_a_en, clr_b_en} = '0;
    {rd_a_set, rd_b_set, set_set, clr_a_set, clr_b_set} = '0;
    {set_way_oh, clr_a_mask, clr_b_mask} = '0;
    for (int s = 0; s < SETS; s++) model[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_a_set = SW'($urandom); rd_b_set = SW'($urandom);
      #1;
      checks++;
      if (rd_a_valid != model[rd_a_set] || rd_b_valid != model[rd_b_set]) begin
        failures++; $display("FAIL: cycle %0d set %0d got %b want %b", i, rd_a_set, rd_a_valid, model[rd_a_set]);
      end
      set_en = ($urandom % 2) == 0;  set_set = SW'($urandom % 4); set_way_oh = WAYS'(1 << ($urandom % WAYS));
      clr_a_en = ($urandom % 4) == 0; clr_a_set = SW'($urandom % 4); clr_a_mask = WAYS'($urandom);
      clr_b_en = ($urandom % 4) == 0; clr_b_set = SW'($urandom % 4); clr_b_mask = WAYS'($urandom);
      @(posedge clk);
      begin
        logic [WAYS-1:0] nv [SETS];
        nv = model;
        if (set_en) nv[set_set] = nv[set_set] | set_way_oh;
        if (clr_a_en) nv[clr_a_set] = nv[clr_a_set] & ~clr_a_mask;
        if (clr_b_en) nv[clr_b_set] = nv[clr_b_set] & ~clr_b_mask;
        model = nv;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

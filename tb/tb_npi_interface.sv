// tb_npi_interface: the testbench fills the command and write-data links and
// takes the read-data link; a behavioural memory controller model sits on the
// native port. Checked: reads are aligned to their line and return the right
// words in order, writes reach memory in order with byte enables, reads after
// writes see the new data, and never more than four reads are outstanding.
module tb_npi_interface;
  import pb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mcmd_empty, mcmd_pop, mwd_empty, mwd_pop, mrd_wr_en, mrd_full;
  mcmd_pkt_t mcmd_data;
  logic [31:0] mwd_data, mrd_wr_data;
  logic npi_cmd_valid, npi_cmd_ready, npi_cmd_rnw, npi_rd_valid, npi_rd_last, npi_rd_ready;
  logic [31:0] npi_cmd_addr, npi_cmd_wdata, npi_rd_data;
  logic [3:0] npi_cmd_nwords, npi_cmd_be;
  logic [2:0] reads_outstanding;

  npi_interface #(.MAX_READS(4)) dut (.*);
  mpmc_model #(.MEM_WORDS(4096), .LATENCY(20), .QDEPTH(8)) u_mem (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] model [4096];
  mcmd_pkt_t cq [$];
  logic [31:0] wq [$], exp_q [$];
  int got = 0, max_out = 0;

  initial begin mcmd_empty = 1'b1; mcmd_data = '0; mwd_empty = 1'b1; mwd_data = '0; mrd_full = 1'b0; end

  always @(negedge clk) begin
    #4;
    if (mcmd_pop && !mcmd_empty) void'(cq.pop_front());
    if (mwd_pop && !mwd_empty) void'(wq.pop_front());
    if (mrd_wr_en && !mrd_full) begin
      checks++;
      if (exp_q.size() == 0 || mrd_wr_data != exp_q[0]) begin
        failures++; $display("FAIL: read word %h expected %h", mrd_wr_data, (exp_q.size() > 0) ? exp_q[0] : 0);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      got++;
    end
    if (int'(reads_outstanding) > max_out) max_out = int'(reads_outstanding);
    @(posedge clk);
    #1;
    mcmd_empty = cq.size() == 0;
    mcmd_data  = (cq.size() > 0) ? cq[0] : '0;
    mwd_empty  = wq.size() == 0;
    mwd_data   = (wq.size() > 0) ? wq[0] : '0;
    mrd_full   = ($urandom % 4) == 0;
  end

  task automatic rd(input logic [31:0] a, input int n);
    logic [31:0] base;
    base = a & ~((32'(n) << 2) - 1);
    cq.push_back('{addr: a, rnw: 1'b1, be: 4'hF, nwords: 4'(n)});
    for (int i = 0; i < n; i++) exp_q.push_back(model[base[13:2] + 12'(i)]);
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be);
    cq.push_back('{addr: a, rnw: 1'b0, be: be, nwords: 4'd1});
    wq.push_back(d);
    for (int b = 0; b < 4; b++) if (be[b]) model[a[13:2]][8*b +: 8] = d[8*b +: 8];
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) model[i] = (i * 32'h0001_0001) ^ 32'hC0DE_0000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(32'h0000_0108, 4);
    rd(32'h0000_0224, 8);
    wr(32'h0000_0100, 32'hFFFF_FFFF, 4'b0101);
    rd(32'h0000_0100, 4);
    for (int k = 0; k < 10; k++) rd(32'(k * 64), 4);
    for (int k = 0; k < 200; k++) begin
      logic [31:0] a;
      a = 32'(($urandom % 1024) * 4);
      if (($urandom % 2) != 0) wr(a, $urandom, 4'($urandom)); else rd(a, (($urandom % 2) != 0) ? 4 : 8);
      if (($urandom % 4) == 0) repeat ($urandom % 20) @(posedge clk);
    end
    while (exp_q.size() > 0 || cq.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(max_out == 4, $sformatf("outstanding reads reached but never passed four (%0d)", max_out));
    for (int i = 0; i < 1024; i++) check(u_mem.mem[i] == model[i], "memory image after writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

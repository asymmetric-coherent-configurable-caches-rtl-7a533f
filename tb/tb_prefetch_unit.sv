// tb_prefetch_unit: the testbench plays the instruction request link, the
// arbiter (grants line reads after a random delay and returns words after a
// fixed latency) and the instruction data link (sometimes full). It checks
// that every request gets exactly the words of its line, that a sequential
// request is served from the buffer without a memory read, that every line
// read is followed by a prefetch of the next line, and that a jump drops the
// buffer and reads memory.
module tb_prefetch_unit;
  localparam int LW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ireq_empty, ireq_pop, mreq_valid, mreq_grant, mdata_valid, mdata_ready;
  logic idata_push, idata_full, pf_hit, pf_miss;
  logic [31:0] ireq_addr, mreq_addr, mdata_word, idata_word;

  prefetch_unit #(.ENABLE(1'b1), .LINE_WORDS(LW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] img(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'hA5A5_0F0F;
  endfunction

  typedef struct { logic [31:0] w; longint t; } tw_t;
  tw_t mq [$];
  logic [31:0] iq [$];
  logic [31:0] got [$];
  logic [31:0] mreqs [$];
  longint cyc = 0;
  int n_hit = 0, n_miss = 0;
  bit grant_now;

  initial begin
    ireq_empty = 1'b1; ireq_addr = '0; mreq_grant = 1'b0; mdata_valid = 1'b0;
    mdata_word = '0; idata_full = 1'b0;
  end

  always @(negedge clk) begin
    #4;
    if (ireq_pop && !ireq_empty) void'(iq.pop_front());
    if (mreq_valid && mreq_grant) begin
      logic [31:0] base;
      mreqs.push_back(mreq_addr);
      base = {mreq_addr[31:4], 4'b0};
      for (int i = 0; i < LW; i++) mq.push_back('{w: img(base + 32'(4*i)), t: cyc + 8});
    end
    if (mdata_valid && mdata_ready) void'(mq.pop_front());
    if (idata_push && !idata_full) got.push_back(idata_word);
    if (pf_hit) n_hit++;
    if (pf_miss) n_miss++;
    @(posedge clk);
    #1;
    cyc++;
    ireq_empty  = iq.size() == 0;
    ireq_addr   = (iq.size() > 0) ? iq[0] : '0;
    mreq_grant  = mreq_valid && (($urandom % 3) != 0);
    mdata_valid = mq.size() > 0 && mq[0].t <= cyc;
    mdata_word  = (mq.size() > 0) ? mq[0].w : '0;
    idata_full  = ($urandom % 4) == 0;
  end

  // issue a request, wait for its LW words, compare
  task automatic line_req(input logic [31:0] a);
    logic [31:0] base;
    base = {a[31:4], 4'b0};
    got = {};
    iq.push_back(a);
    while (got.size() < LW) @(posedge clk);
    for (int i = 0; i < LW; i++) check(got[i] == img(base + 32'(4*i)), $sformatf("word %0d of %h", i, a));
  endtask

  task automatic settle();
    repeat (40) @(posedge clk);
  endtask

  int m0, h0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    line_req(32'h0000_1004); settle();
    check(mreqs.size() == 2 && mreqs[0] == 32'h0000_1004 && mreqs[1] == 32'h0000_1010,
          "demand read followed by prefetch of next line");
    m0 = mreqs.size(); h0 = n_hit;
    line_req(32'h0000_1018); settle();
    check(n_hit == h0 + 1, "sequential request hits the buffer");
    check(mreqs.size() == m0 + 1 && mreqs[$] == 32'h0000_1020, "only the next prefetch went to memory");
    m0 = mreqs.size();
    line_req(32'h0000_8000); settle();
    check(mreqs.size() == m0 + 2 && mreqs[m0] == 32'h0000_8000 && mreqs[m0+1] == 32'h0000_8010,
          "jump: demand read then new prefetch");
    // request arriving while the prefetch is still in flight
    line_req(32'h0000_8010);
    line_req(32'h0000_8020);
    settle();
    check(n_hit >= 3, "back-to-back sequential requests hit");
    for (int i = 0; i < 60; i++) begin
      logic [31:0] a;
      a = (($urandom % 3) == 0) ? 32'(($urandom % 64) * 16) : (mreqs[$] & ~32'hF);
      line_req(a);
    end
    check(n_hit + n_miss == 65, "every request counted once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

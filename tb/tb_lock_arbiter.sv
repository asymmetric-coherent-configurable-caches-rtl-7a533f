// tb_lock_arbiter: directed LWX/SWX sequences on three ports: a reservation
// followed by a matching SWX succeeds; a different address fails; a store of
// another port to the reserved word breaks the reservation; reservations of
// different ports on different words coexist; SWX clears its own reservation.
module tb_lock_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic op_valid = 1'b0, op_rnw = 1'b0, op_cond = 1'b0, cond_ok;
  logic [1:0] op_port = '0;
  logic [31:0] op_addr = '0;
  logic [2:0] resv_valid;
  int checks = 0, failures = 0;

  lock_arbiter #(.PORTS(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // perform one operation; return the SWX result seen in that cycle
  task automatic op(input int port, input logic [31:0] a, input bit rnw, input bit cond, output bit ok);
    @(negedge clk);
    op_valid = 1'b1; op_port = 2'(port); op_addr = a; op_rnw = rnw; op_cond = cond;
    #1 ok = cond_ok;
    @(negedge clk);
    op_valid = 1'b0;
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit ok;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    op(0, 32'h100, 1'b0, 1'b1, ok); check(!ok, "SWX without reservation fails");
    op(0, 32'h100, 1'b1, 1'b1, ok); check(resv_valid == 3'b001, "LWX sets reservation");
    op(0, 32'h100, 1'b0, 1'b1, ok); check(ok, "matching SWX succeeds");
    check(resv_valid == 3'b000, "SWX clears own reservation");
    op(1, 32'h200, 1'b1, 1'b1, ok);
    op(1, 32'h204, 1'b0, 1'b1, ok); check(!ok, "SWX to another word fails");
    op(0, 32'h300, 1'b1, 1'b1, ok);
    op(1, 32'h304, 1'b1, 1'b1, ok);
    check(resv_valid == 3'b011, "two ports hold reservations");
    op(2, 32'h300, 1'b0, 1'b0, ok);
    check(resv_valid == 3'b010, "store of another port clears matching reservation only");
    op(0, 32'h300, 1'b0, 1'b1, ok); check(!ok, "SWX after foreign store fails");
    op(1, 32'h304, 1'b0, 1'b1, ok); check(ok, "untouched reservation still succeeds");
    op(2, 32'h400, 1'b1, 1'b1, ok);
    op(0, 32'h400, 1'b1, 1'b0, ok);
    check(resv_valid == 3'b100, "plain load leaves reservations alone");
    op(1, 32'h400, 1'b1, 1'b1, ok);
    op(2, 32'h400, 1'b0, 1'b1, ok); check(ok, "first SWX of two racing ports succeeds");
    op(1, 32'h400, 1'b0, 1'b1, ok); check(!ok, "second racing SWX fails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

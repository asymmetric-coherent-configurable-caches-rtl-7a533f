// lock_arbiter: reservation handling for conditional loads and stores (LWX/SWX).
//
// In PolyBlaze the reservation bit of MicroBlaze moves out of the processor
// into the L2 Arbiter, which sees every memory operation of every port in one
// order. Each port has its own reservation bit and reservation address, so
// several cores can hold reservations on different locks at once.
//
// Rules (from the document): a conditional load of port p sets p's bit and
// records its address; a conditional store of port p succeeds only if p's bit
// is set and its address matches; a failed conditional store is dropped. Any
// store that reaches memory clears the reservation of every other port that
// holds the same address. Design choices: addresses match at word granularity
// (bits 31:2), and a conditional store always clears its own port's
// reservation, whether it succeeds or not (as the SWX of MicroBlaze does).
//
// Interface: op_valid with op_port, op_addr, op_rnw and op_cond describes the
// operation the L2 Arbiter is executing this cycle. cond_ok (combinational) is
// the result for a conditional store. The reservation state changes at the
// clock edge; callers must assert op_valid only in the cycle the operation is
// actually performed.
module lock_arbiter #(
  parameter int unsigned PORTS = 2,
  localparam int unsigned PW   = (PORTS > 1) ? $clog2(PORTS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    op_valid,
  input  logic [PW-1:0]           op_port,
  input  logic [31:0]             op_addr,
  input  logic                    op_rnw,
  input  logic                    op_cond,
  output logic                    cond_ok,
  output logic [PORTS-1:0]        resv_valid   // for observation
);
  logic [29:0] resv_addr [PORTS];

  assign cond_ok = resv_valid[op_port] && (resv_addr[op_port] == op_addr[31:2]);

  logic store_done;  // a store that reaches memory this cycle
  assign store_done = op_valid && !op_rnw && (!op_cond || cond_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resv_valid <= '0;
      for (int p = 0; p < PORTS; p++) resv_addr[p] <= '0;
    end else if (op_valid) begin
      for (int p = 0; p < PORTS; p++) begin
        if (PW'(p) == op_port) begin
          if (op_rnw && op_cond) begin
            resv_valid[p] <= 1'b1;
            resv_addr[p]  <= op_addr[31:2];
          end else if (!op_rnw && op_cond) begin
            resv_valid[p] <= 1'b0;
          end
        end else if (store_done && resv_addr[p] == op_addr[31:2]) begin
          resv_valid[p] <= 1'b0;
        end
      end
    end
  end
endmodule

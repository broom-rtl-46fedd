// ras: return address stack of the branch target buffer, predicting the
// target of function returns.
//
// A call pushes its return address; a return pops, and top shows the
// predicted return target (valid only while the stack is not empty).  The
// stack is a circular buffer: pushing onto a full stack overwrites the oldest
// entry, as the oldest call's return is the one least likely to be needed.
// A push and a pop in the same cycle (a call that is also a return) replaces
// the top.  Push/pop take effect at the clock edge.  Depth and the overflow
// behaviour are this design's choices; the description only names the unit.
module ras
  import broom_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  logic [VADDR_BITS-1:0] push_addr,
  input  logic                  pop,
  output logic                  top_valid,
  output logic [VADDR_BITS-1:0] top
);

  logic [VADDR_BITS-1:0] stk [DEPTH];
  logic [PW-1:0]         tos_q;    // index of the top entry
  logic [PW:0]           cnt_q;    // entries held, saturates at DEPTH

  assign top_valid = (cnt_q != '0);
  assign top       = stk[tos_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos_q <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (push && pop) begin
      stk[tos_q] <= push_addr;
      if (cnt_q == '0) cnt_q <= 1;
    end else if (push) begin
      tos_q               <= tos_q + 1'b1;
      stk[PW'(tos_q + 1)] <= push_addr;
      if (cnt_q != (PW+1)'(DEPTH)) cnt_q <= cnt_q + 1'b1;
    end else if (pop && cnt_q != '0) begin
      tos_q <= tos_q - 1'b1;
      cnt_q <= cnt_q - 1'b1;
    end
  end

endmodule

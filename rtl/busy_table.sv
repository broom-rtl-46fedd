// busy_table: rename-stage busy table, one bit per physical register, set
// while the register's producer has not yet written back.
//
// Each cycle up to DISP uops are renamed.  For every source of every uop the
// table answers whether the register is still busy; the answer is combinational
// (the busy-table read sits in the rename stage).  A writeback in the same
// cycle clears the bit before it is read (bypass), and a destination
// allocated by an older uop of the same group reads as busy for a younger
// one.  Allocating a destination sets its bit at the clock edge; a
// writeback clears it.  With ZERO_REG=1 register 0 is the hard-wired zero
// register and is never busy.  All bits are clear after reset.
// The description names the busy-table read as a critical path of rename;
// its organisation and port counts here are this design's choices.
module busy_table
  import broom_pkg::*;
#(
  parameter int unsigned NPREGS   = INT_PREGS,
  parameter int unsigned DISP     = 2,
  parameter int unsigned SRCS     = 2,
  parameter int unsigned NWB      = 3,
  parameter bit          ZERO_REG = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DISP-1:0]      alloc_valid,
  input  logic [PREG_BITS-1:0] alloc_preg [DISP],
  input  logic [PREG_BITS-1:0] rd_preg    [DISP][SRCS],
  output logic                 rd_busy    [DISP][SRCS],
  input  wakeup_t              wb         [NWB]
);

  localparam int unsigned IB = $clog2(NPREGS);

  logic [NPREGS-1:0] busy_q, wb_clear, after_wb, alloc_set;

  always_comb begin
    wb_clear  = '0;
    alloc_set = '0;
    for (int k = 0; k < NWB; k++)
      if (wb[k].valid && int'(wb[k].pdst) < NPREGS) wb_clear[wb[k].pdst[IB-1:0]] = 1'b1;
    for (int d = 0; d < DISP; d++)
      if (alloc_valid[d] && int'(alloc_preg[d]) < NPREGS && !(ZERO_REG && alloc_preg[d] == '0))
        alloc_set[alloc_preg[d][IB-1:0]] = 1'b1;
    after_wb = busy_q & ~wb_clear;
  end

  always_comb begin
    for (int d = 0; d < DISP; d++) begin
      for (int s = 0; s < SRCS; s++) begin
        rd_busy[d][s] = (int'(rd_preg[d][s]) < NPREGS) ? after_wb[rd_preg[d][s][IB-1:0]] : 1'b0;
        for (int o = 0; o < d; o++)
          if (alloc_valid[o] && alloc_preg[o] == rd_preg[d][s]) rd_busy[d][s] = 1'b1;
        if (ZERO_REG && rd_preg[d][s] == '0) rd_busy[d][s] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= '0;
    else        busy_q <= after_wb | alloc_set;
  end

endmodule

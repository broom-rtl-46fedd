// fp_regfile: floating-point physical register file with three read ports
// (the three operands of the fused multiply-add unit) and two write ports
// (the FPU and floating-point loads).
//
// Unlike the integer file it is a plain synthesized array with no special
// read structure.  Reads are combinational; writes happen at the clock edge
// and a same-cycle read returns the old value.  There is no zero register.
// Two writes to one register in one cycle are not allowed (asserted).
// Contents are cleared by reset.  Port counts follow the design
// description; the 64 entries of 64 bits (IEEE double, no recoding) are this
// design's choice.
module fp_regfile
  import broom_pkg::*;
#(
  parameter int unsigned NREGS  = FP_PREGS,
  parameter int unsigned WIDTH  = XLEN,
  parameter int unsigned NREAD  = 3,
  parameter int unsigned NWRITE = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PREG_BITS-1:0] raddr [NREAD],
  output logic [WIDTH-1:0]     rdata [NREAD],
  input  logic [NWRITE-1:0]    we,
  input  logic [PREG_BITS-1:0] waddr [NWRITE],
  input  logic [WIDTH-1:0]     wdata [NWRITE]
);

  localparam int unsigned IB = $clog2(NREGS);

  logic [WIDTH-1:0] regs_q [NREGS];

  always_comb begin
    for (int p = 0; p < NREAD; p++)
      rdata[p] = (int'(raddr[p]) < NREGS) ? regs_q[raddr[p][IB-1:0]] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs_q[r] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++)
        if (we[w] && int'(waddr[w]) < NREGS) regs_q[waddr[w][IB-1:0]] <= wdata[w];
    end
  end

  for (genvar a = 0; a < NWRITE; a++) begin : g_wchk
    for (genvar b = a + 1; b < NWRITE; b++) begin : g_pair
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
        !(we[a] && we[b] && waddr[a] == waddr[b]));
    end
  end

endmodule

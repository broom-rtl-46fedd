// int_regfile: integer physical register file, 70 x 64 bits with six read
// ports and three write ports (two integer issue ports and one memory issue
// port, two operands each).
//
// The array is read with hierarchical bitlines.  The registers are grouped
// into clusters of CLUSTER entries.  Inside a cluster every register has a
// read enable per port that drives the cluster's local read line (the
// tri-state bit cell, modelled here as an AND-OR of one-hot enables); a
// multiplexer then picks the local line of the addressed cluster.  No read
// line has to span all 70 registers.
// Reads are combinational (the register-read stage has a full cycle);
// writes happen at the clock edge, and a read in the same cycle as a write
// to the same register returns the old value.  Register 0 is the zero
// register: it reads as 0 and ignores writes.  Two writes to one register in
// one cycle are not allowed (asserted).  Contents are cleared by reset.
// Size, port counts and the clustered read structure follow the design
// description; the cluster size and zero-register handling are this
// design's choices.
module int_regfile
  import broom_pkg::*;
#(
  parameter int unsigned NREGS   = INT_PREGS,
  parameter int unsigned WIDTH   = XLEN,
  parameter int unsigned NREAD   = 6,
  parameter int unsigned NWRITE  = 3,
  parameter int unsigned CLUSTER = 10,
  localparam int unsigned NCLUST = (NREGS + CLUSTER - 1) / CLUSTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PREG_BITS-1:0] raddr [NREAD],
  output logic [WIDTH-1:0]     rdata [NREAD],
  input  logic [NWRITE-1:0]    we,
  input  logic [PREG_BITS-1:0] waddr [NWRITE],
  input  logic [WIDTH-1:0]     wdata [NWRITE]
);

  logic [WIDTH-1:0] bits_q [NREGS];

  // hierarchical read: local (in-cluster) lines, then a cluster multiplexer
  logic [WIDTH-1:0] local_line [NREAD][NCLUST];
  always_comb begin
    for (int p = 0; p < NREAD; p++) begin
      for (int c = 0; c < NCLUST; c++) begin
        local_line[p][c] = '0;
        for (int r = c * CLUSTER; r < (c + 1) * CLUSTER && r < NREGS; r++)
          if (int'(raddr[p]) == r) local_line[p][c] |= bits_q[r];   // read-enable drives the line
      end
      rdata[p] = '0;
      for (int c = 0; c < NCLUST; c++)
        if (int'(raddr[p]) / CLUSTER == c) rdata[p] = local_line[p][c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) bits_q[r] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++)
        if (we[w] && waddr[w] != '0 && int'(waddr[w]) < NREGS) bits_q[waddr[w]] <= wdata[w];
    end
  end

  for (genvar a = 0; a < NWRITE; a++) begin : g_wchk
    for (genvar b = a + 1; b < NWRITE; b++) begin : g_pair
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
        !(we[a] && we[b] && waddr[a] == waddr[b] && waddr[a] != '0));
    end
  end

endmodule

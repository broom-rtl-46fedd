// core_backend: the issue and register-read part of the out-of-order core.
//
// Renamed uops arrive two per cycle (disp_*), each steered to one of three
// distributed issue windows: integer (two issue ports), memory (one) and
// floating point (one).  On dispatch the busy tables fill in whether each
// source register still waits for its producer.  Each window wakes its uops
// from the writeback broadcasts and picks the oldest ready ones.
// Issue select and register read are separate pipeline stages: selected uops
// are registered, and in the next cycle read their operands from the integer
// file (two ports per integer/memory issue port, six in all) or from the
// floating-point file (three ports for the fused multiply-add) and leave on
// exe_* to the functional units.  Results come back on int_wb/fp_wb, are
// written to the register files, clear the busy bits and wake waiting uops;
// a uop woken by a writeback in cycle t issues at t+1 at the earliest.
// disp_ready is low unless every window has room for a full dispatch group.
// Port 0/1 = integer, 2 = memory, 3 = floating point.  The window sizes, port
// counts, register-file shapes and the separate select/read stages follow
// the design description; dispatch width and the steering field are this
// design's choices.
module core_backend
  import broom_pkg::*;
#(
  parameter int unsigned IQ_ENTRIES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch from rename
  input  logic [1:0]        disp_valid,
  input  iq_kind_e          disp_kind [2],
  input  uop_t              disp_uop  [2],
  output logic              disp_ready,
  // to the functional units (register-read stage outputs)
  output logic [3:0]        exe_valid,
  output uop_t              exe_uop  [4],
  output logic [XLEN-1:0]   exe_rs1  [4],
  output logic [XLEN-1:0]   exe_rs2  [4],
  output logic [XLEN-1:0]   exe_rs3,          // third operand, FP port only
  // writeback from the functional units
  input  logic [2:0]        int_wb_valid,
  input  logic [PREG_BITS-1:0] int_wb_pdst [3],
  input  logic [XLEN-1:0]   int_wb_data [3],
  input  logic [1:0]        fp_wb_valid,
  input  logic [PREG_BITS-1:0] fp_wb_pdst [2],
  input  logic [XLEN-1:0]   fp_wb_data [2],
  // occupancy, for monitoring
  output logic [$clog2(IQ_ENTRIES+1)-1:0] iq_int_occ,
  output logic [$clog2(IQ_ENTRIES+1)-1:0] iq_mem_occ,
  output logic [$clog2(IQ_ENTRIES+1)-1:0] iq_fp_occ
);

  wakeup_t int_wk [3];
  wakeup_t fp_wk  [2];
  always_comb begin
    for (int k = 0; k < 3; k++) int_wk[k] = '{valid: int_wb_valid[k], pdst: int_wb_pdst[k]};
    for (int k = 0; k < 2; k++) fp_wk[k]  = '{valid: fp_wb_valid[k],  pdst: fp_wb_pdst[k]};
  end

  // ---------------- busy tables ----------------
  logic [1:0]           int_alloc, fp_alloc;
  logic [PREG_BITS-1:0] alloc_preg [2];
  logic [PREG_BITS-1:0] int_rd [2][2];
  logic                 int_busy [2][2];
  logic [PREG_BITS-1:0] fp_rd [2][3];
  logic                 fp_busy [2][3];

  always_comb begin
    for (int d = 0; d < 2; d++) begin
      alloc_preg[d] = disp_uop[d].pdst;
      int_alloc[d]  = disp_valid[d] && disp_ready && disp_uop[d].dst_en && disp_kind[d] != IQ_FP;
      fp_alloc[d]   = disp_valid[d] && disp_ready && disp_uop[d].dst_en && disp_kind[d] == IQ_FP;
      int_rd[d][0]  = disp_uop[d].prs1;
      int_rd[d][1]  = disp_uop[d].prs2;
      fp_rd[d][0]   = disp_uop[d].prs1;
      fp_rd[d][1]   = disp_uop[d].prs2;
      fp_rd[d][2]   = disp_uop[d].prs3;
    end
  end

  busy_table #(.NPREGS(INT_PREGS), .DISP(2), .SRCS(2), .NWB(3), .ZERO_REG(1'b1)) u_int_busy (
    .clk, .rst_n, .alloc_valid(int_alloc), .alloc_preg(alloc_preg),
    .rd_preg(int_rd), .rd_busy(int_busy), .wb(int_wk));
  busy_table #(.NPREGS(FP_PREGS), .DISP(2), .SRCS(3), .NWB(2), .ZERO_REG(1'b0)) u_fp_busy (
    .clk, .rst_n, .alloc_valid(fp_alloc), .alloc_preg(alloc_preg),
    .rd_preg(fp_rd), .rd_busy(fp_busy), .wb(fp_wk));

  // uops with their busy bits filled in
  uop_t d_uop [2];
  logic [1:0] v_int, v_mem, v_fp;
  always_comb begin
    for (int d = 0; d < 2; d++) begin
      d_uop[d] = disp_uop[d];
      if (disp_kind[d] == IQ_FP) begin
        d_uop[d].p1_busy = fp_busy[d][0];
        d_uop[d].p2_busy = fp_busy[d][1];
        d_uop[d].p3_busy = fp_busy[d][2];
      end else begin
        d_uop[d].p1_busy = int_busy[d][0];
        d_uop[d].p2_busy = int_busy[d][1];
        d_uop[d].p3_busy = 1'b0;
      end
      v_int[d] = disp_valid[d] && disp_ready && disp_kind[d] == IQ_INT;
      v_mem[d] = disp_valid[d] && disp_ready && disp_kind[d] == IQ_MEM;
      v_fp[d]  = disp_valid[d] && disp_ready && disp_kind[d] == IQ_FP;
    end
  end

  // Windows take uops in dispatch order: pack the selected uops to the front.
  function automatic void pack(input logic [1:0] v, input uop_t u [2],
                               output logic [1:0] pv, output uop_t pu [2]);
    pv = '0; pu[0] = '0; pu[1] = '0;
    if (v[0]) begin pv[0] = 1'b1; pu[0] = u[0]; if (v[1]) begin pv[1] = 1'b1; pu[1] = u[1]; end end
    else if (v[1]) begin pv[0] = 1'b1; pu[0] = u[1]; end
  endfunction

  logic [1:0] pv_int, pv_mem, pv_fp;
  uop_t       pu_int [2], pu_mem [2], pu_fp [2];
  always_comb begin
    pack(v_int, d_uop, pv_int, pu_int);
    pack(v_mem, d_uop, pv_mem, pu_mem);
    pack(v_fp,  d_uop, pv_fp,  pu_fp);
  end

  // ---------------- issue windows ----------------
  logic       rdy_int, rdy_mem, rdy_fp;
  logic [1:0] iss_v_int;
  logic [0:0] iss_v_mem, iss_v_fp;
  uop_t       iss_int [2];
  uop_t       iss_mem [1];
  uop_t       iss_fp  [1];

  issue_window #(.ENTRIES(IQ_ENTRIES), .ISSUE(2), .DISP(2), .NWB(3)) u_iq_int (
    .clk, .rst_n, .disp_valid(pv_int), .disp_uop(pu_int), .disp_ready(rdy_int),
    .wb(int_wk), .iss_valid(iss_v_int), .iss_uop(iss_int), .occupancy(iq_int_occ));
  issue_window #(.ENTRIES(IQ_ENTRIES), .ISSUE(1), .DISP(2), .NWB(3)) u_iq_mem (
    .clk, .rst_n, .disp_valid(pv_mem), .disp_uop(pu_mem), .disp_ready(rdy_mem),
    .wb(int_wk), .iss_valid(iss_v_mem), .iss_uop(iss_mem), .occupancy(iq_mem_occ));
  issue_window #(.ENTRIES(IQ_ENTRIES), .ISSUE(1), .DISP(2), .NWB(2)) u_iq_fp (
    .clk, .rst_n, .disp_valid(pv_fp), .disp_uop(pu_fp), .disp_ready(rdy_fp),
    .wb(fp_wk), .iss_valid(iss_v_fp), .iss_uop(iss_fp), .occupancy(iq_fp_occ));

  assign disp_ready = rdy_int && rdy_mem && rdy_fp;

  // ---------------- register-read stage ----------------
  logic [3:0] rr_v_q;
  uop_t       rr_u_q [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_v_q <= '0;
      for (int p = 0; p < 4; p++) rr_u_q[p] <= '0;
    end else begin
      rr_v_q <= {iss_v_fp[0], iss_v_mem[0], iss_v_int};
      rr_u_q[0] <= iss_int[0];
      rr_u_q[1] <= iss_int[1];
      rr_u_q[2] <= iss_mem[0];
      rr_u_q[3] <= iss_fp[0];
    end
  end

  logic [PREG_BITS-1:0] irf_ra [6];
  logic [XLEN-1:0]      irf_rd [6];
  logic [PREG_BITS-1:0] frf_ra [3];
  logic [XLEN-1:0]      frf_rd [3];

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      irf_ra[2*p]   = rr_u_q[p].prs1;
      irf_ra[2*p+1] = rr_u_q[p].prs2;
    end
    frf_ra[0] = rr_u_q[3].prs1;
    frf_ra[1] = rr_u_q[3].prs2;
    frf_ra[2] = rr_u_q[3].prs3;
  end

  int_regfile #(.NREGS(INT_PREGS), .NREAD(6), .NWRITE(3)) u_irf (
    .clk, .rst_n, .raddr(irf_ra), .rdata(irf_rd),
    .we(int_wb_valid), .waddr(int_wb_pdst), .wdata(int_wb_data));
  fp_regfile #(.NREGS(FP_PREGS), .NREAD(3), .NWRITE(2)) u_frf (
    .clk, .rst_n, .raddr(frf_ra), .rdata(frf_rd),
    .we(fp_wb_valid), .waddr(fp_wb_pdst), .wdata(fp_wb_data));

  always_comb begin
    exe_valid = rr_v_q;
    for (int p = 0; p < 4; p++) exe_uop[p] = rr_u_q[p];
    for (int p = 0; p < 3; p++) begin
      exe_rs1[p] = irf_rd[2*p];
      exe_rs2[p] = irf_rd[2*p+1];
    end
    exe_rs1[3] = frf_rd[0];
    exe_rs2[3] = frf_rd[1];
    exe_rs3    = frf_rd[2];
  end

endmodule

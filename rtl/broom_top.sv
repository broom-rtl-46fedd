// broom_top: the BROOM test chip, one out-of-order core and a 1 MiB
// resilient L2 cache, each in its own clock and voltage domain.
//
// Core domain (clk_core): the frontend (fetch, BTB, return address stack,
// global-history branch predictor) and the backend issue/register-read
// slice (busy tables, integer/memory/floating-point issue windows, the
// 6-read/3-write integer and 3-read/2-write floating-point register files).
// The parts between them that this RTL does not contain -- decode, rename
// map tables, reorder buffer, functional units, load/store unit and the L1
// caches -- connect through the top's ports: fetched instructions leave on
// fetch_*, renamed uops enter on disp_*, operands leave on exe_*, results
// return on *_wb_*, branch outcomes on res_*, and the instruction cache is
// reached through imem_*.
// L2 domain (clk_l2): the resilient L2 cache with its boot-time BIST.  Its
// client port faces the L1 caches (through the uncore's clock-domain
// crossing, also outside this RTL) and its memory port faces off-chip
// memory.  Set l2_assist_en and pulse l2_bist_start after the L2 supply is
// set; the L2 accepts requests once l2_bist_done is high.
// All sizes are the module defaults of the blocks, which follow the design
// description where it gives them.
module broom_top
  import broom_pkg::*;
(
  input  logic                  clk_core,
  input  logic                  rst_core_n,
  input  logic                  clk_l2,
  input  logic                  rst_l2_n,
  // ---- frontend ----
  output logic                  imem_req_valid,
  output logic [VADDR_BITS-1:0] imem_req_pc,
  input  logic [31:0]           imem_resp_inst,
  output logic                  fetch_valid,
  output logic [VADDR_BITS-1:0] fetch_pc,
  output logic [31:0]           fetch_inst,
  output logic                  fetch_pred_taken,
  output logic [VADDR_BITS-1:0] fetch_pred_target,
  output logic                  fetch_btb_hit,
  output logic [0:0]            fetch_btb_way,
  output logic [1:0]            fetch_btb_ctr,
  output logic                  fetch_bpd_valid,
  output logic [11:0]           fetch_bpd_idx,
  output logic [1:0]            fetch_bpd_ctr,
  output logic [11:0]           fetch_ghist,
  input  logic                  res_valid,
  input  logic [VADDR_BITS-1:0] res_pc,
  input  br_kind_e              res_kind,
  input  logic                  res_taken,
  input  logic [VADDR_BITS-1:0] res_target,
  input  logic                  res_mispredict,
  input  logic                  res_btb_hit,
  input  logic [0:0]            res_btb_way,
  input  logic [1:0]            res_btb_ctr,
  input  logic                  res_bpd_valid,
  input  logic [11:0]           res_bpd_idx,
  input  logic [1:0]            res_bpd_ctr,
  input  logic [11:0]           res_ghist,
  output logic [3:0]            fe_events,     // {mispredict, ras, bpd redirect, btb redirect}
  // ---- backend ----
  input  logic [1:0]            disp_valid,
  input  iq_kind_e              disp_kind [2],
  input  uop_t                  disp_uop  [2],
  output logic                  disp_ready,
  output logic [3:0]            exe_valid,
  output uop_t                  exe_uop  [4],
  output logic [XLEN-1:0]       exe_rs1  [4],
  output logic [XLEN-1:0]       exe_rs2  [4],
  output logic [XLEN-1:0]       exe_rs3,
  input  logic [2:0]            int_wb_valid,
  input  logic [PREG_BITS-1:0]  int_wb_pdst [3],
  input  logic [XLEN-1:0]       int_wb_data [3],
  input  logic [1:0]            fp_wb_valid,
  input  logic [PREG_BITS-1:0]  fp_wb_pdst [2],
  input  logic [XLEN-1:0]       fp_wb_data [2],
  // ---- L2 ----
  input  logic                  l2_bist_start,
  input  logic                  l2_assist_en,
  output logic                  l2_bist_done,
  input  logic                  l2_req_valid,
  output logic                  l2_req_ready,
  input  logic                  l2_req_we,
  input  logic [31:0]           l2_req_addr,
  input  logic [63:0]           l2_req_wdata,
  input  logic [7:0]            l2_req_wmask,
  output logic                  l2_resp_valid,
  output logic [63:0]           l2_resp_rdata,
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [31:0]           mem_req_addr,
  output logic [63:0]           mem_req_wdata,
  output logic [7:0]            mem_req_wmask,
  input  logic                  mem_resp_valid,
  input  logic [63:0]           mem_resp_rdata,
  output logic [15:0]           l2_log [4],    // {lines disabled, DCR, BB-S, recycled groups}
  output logic [4:0]            l2_events      // {recycled, uncached, writeback, miss, hit}
);

  frontend u_frontend (
    .clk(clk_core), .rst_n(rst_core_n),
    .imem_req_valid, .imem_req_pc, .imem_resp_inst,
    .out_valid(fetch_valid), .out_pc(fetch_pc), .out_inst(fetch_inst),
    .out_pred_taken(fetch_pred_taken), .out_pred_target(fetch_pred_target),
    .out_btb_hit(fetch_btb_hit), .out_btb_way(fetch_btb_way), .out_btb_ctr(fetch_btb_ctr),
    .out_bpd_valid(fetch_bpd_valid), .out_bpd_idx(fetch_bpd_idx), .out_bpd_ctr(fetch_bpd_ctr),
    .out_ghist(fetch_ghist),
    .res_valid, .res_pc, .res_kind, .res_taken, .res_target, .res_mispredict,
    .res_btb_hit, .res_btb_way, .res_btb_ctr, .res_bpd_valid, .res_bpd_idx, .res_bpd_ctr,
    .res_ghist,
    .ev_btb_redirect(fe_events[0]), .ev_bpd_redirect(fe_events[1]),
    .ev_ras_predict(fe_events[2]), .ev_mispredict(fe_events[3]));

  core_backend u_backend (
    .clk(clk_core), .rst_n(rst_core_n),
    .disp_valid, .disp_kind, .disp_uop, .disp_ready,
    .exe_valid, .exe_uop, .exe_rs1, .exe_rs2, .exe_rs3,
    .int_wb_valid, .int_wb_pdst, .int_wb_data, .fp_wb_valid, .fp_wb_pdst, .fp_wb_data,
    .iq_int_occ(), .iq_mem_occ(), .iq_fp_occ());

  l2_cache u_l2 (
    .clk(clk_l2), .rst_n(rst_l2_n),
    .bist_start(l2_bist_start), .assist_en(l2_assist_en), .bist_busy(), .bist_done(l2_bist_done),
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_addr(l2_req_addr), .req_wdata(l2_req_wdata), .req_wmask(l2_req_wmask),
    .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wmask, .mem_resp_valid, .mem_resp_rdata,
    .log_ld(l2_log[0]), .log_dcr(l2_log[1]), .log_bbs(l2_log[2]), .log_lr(l2_log[3]),
    .ev_hit(l2_events[0]), .ev_miss(l2_events[1]), .ev_writeback(l2_events[2]),
    .ev_uncached(l2_events[3]), .ev_recycled_access(l2_events[4]));

endmodule

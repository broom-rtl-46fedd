// frontend: instruction fetch and next-PC selection.
//
// Three stages, one instruction per cycle:
//   F0  the fetch PC goes to the instruction memory, the BTB and the BPD
//       hash stage.
//   F1  the instruction returns and is pre-decoded; the BTB answer arrives.
//       A jal, a return (target from the RAS), an indirect jump that hits
//       in the BTB, or a conditional branch whose BTB counter says taken
//       redirects fetch here: one bubble.  Calls push the RAS here.
//   F2  the BPD direction, read in parallel with pre-decode, arrives.  For
//       a conditional branch whose BPD direction disagrees with the path
//       chosen in F1, fetch is redirected again at the start of this stage:
//       two bubbles, one more than a BTB redirect.  The instruction leaves
//       on out_* with the final prediction and the metadata the branch unit
//       returns on resolution.
// A resolved mispredict (res_mispredict) restarts fetch at the correct
// address and restores the global history.  Every resolved control-flow
// instruction updates the BTB; conditional branches also update the BPD.
// The instruction memory must answer in the next cycle (an L1 hit); the
// downstream fetch buffer is assumed never to be full, so there is no stall.
// The F1/F2 split with the BPD redirect a stage later follows the design
// description; the single-instruction fetch, pre-decode rules and history
// handling are this design's choices.  ev_* pulse once per event.
// The branch kind stored in the BTB is not used here: with one instruction
// per fetch, pre-decode in F1 gives the same information in the same stage.
module frontend
  import broom_pkg::*;
#(
  parameter logic [VADDR_BITS-1:0] RESET_PC = 40'h80000000,
  parameter int unsigned HIST_BITS = 12,
  parameter int unsigned BTB_SETS  = 128,
  parameter int unsigned BTB_WAYS  = 2,
  parameter int unsigned RAS_DEPTH = 8,
  localparam int unsigned BWB = (BTB_WAYS > 1) ? $clog2(BTB_WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction memory (L1 instruction cache)
  output logic                  imem_req_valid,
  output logic [VADDR_BITS-1:0] imem_req_pc,
  input  logic [31:0]           imem_resp_inst,
  // fetched instruction to decode
  output logic                  out_valid,
  output logic [VADDR_BITS-1:0] out_pc,
  output logic [31:0]           out_inst,
  output logic                  out_pred_taken,
  output logic [VADDR_BITS-1:0] out_pred_target,
  output logic                  out_btb_hit,
  output logic [BWB-1:0]        out_btb_way,
  output logic [1:0]            out_btb_ctr,
  output logic                  out_bpd_valid,
  output logic [HIST_BITS-1:0]  out_bpd_idx,
  output logic [1:0]            out_bpd_ctr,
  output logic [HIST_BITS-1:0]  out_ghist,
  // branch resolution from the branch unit
  input  logic                  res_valid,
  input  logic [VADDR_BITS-1:0] res_pc,
  input  br_kind_e              res_kind,
  input  logic                  res_taken,
  input  logic [VADDR_BITS-1:0] res_target,
  input  logic                  res_mispredict,
  input  logic                  res_btb_hit,
  input  logic [BWB-1:0]        res_btb_way,
  input  logic [1:0]            res_btb_ctr,
  input  logic                  res_bpd_valid,
  input  logic [HIST_BITS-1:0]  res_bpd_idx,
  input  logic [1:0]            res_bpd_ctr,
  input  logic [HIST_BITS-1:0]  res_ghist,
  // events
  output logic                  ev_btb_redirect,
  output logic                  ev_bpd_redirect,
  output logic                  ev_ras_predict,
  output logic                  ev_mispredict
);

  // ---------------- state ----------------
  logic [VADDR_BITS-1:0] pc_f0_q, pc_f1_q, pc_f2_q;
  logic                  v_f1_q, v_f2_q, started_q;
  logic [HIST_BITS-1:0]  ghist_q, ghist_f1_q, ghist_f2_q;
  logic [31:0]           inst_f2_q;
  logic                  isbr_f2_q, f1_taken_q;
  logic [VADDR_BITS-1:0] f1_target_q, brtgt_f2_q;
  logic                  btb_hit_f2_q;
  logic [BWB-1:0]        btb_way_f2_q;
  logic [1:0]            btb_ctr_f2_q;
  logic                  f2_redirect, final_taken;
  logic [VADDR_BITS-1:0] final_target;

  // ---------------- F0 ----------------
  assign imem_req_valid = started_q;
  assign imem_req_pc    = pc_f0_q;

  logic                  btb_rv, btb_hit, btb_taken;
  logic [VADDR_BITS-1:0] btb_target;
  br_kind_e              btb_kind;
  logic [BWB-1:0]        btb_way;
  logic [1:0]            btb_ctr;
  logic                  bpd_rv, bpd_taken;
  logic [1:0]            bpd_ctr;
  logic [HIST_BITS-1:0]  bpd_idx;

  btb #(.SETS(BTB_SETS), .WAYS(BTB_WAYS)) u_btb (
    .clk, .rst_n,
    .req_valid(started_q), .req_pc(pc_f0_q),
    .resp_valid(btb_rv), .resp_hit(btb_hit), .resp_taken(btb_taken),
    .resp_target(btb_target), .resp_kind(btb_kind), .resp_way(btb_way), .resp_ctr(btb_ctr),
    .upd_valid(res_valid), .upd_pc(res_pc), .upd_target(res_target), .upd_kind(res_kind),
    .upd_taken(res_taken), .upd_was_hit(res_btb_hit), .upd_way(res_btb_way),
    .upd_ctr(res_btb_ctr));

  bpd #(.HIST_BITS(HIST_BITS)) u_bpd (
    .clk, .rst_n,
    .req_valid(started_q), .req_pc(pc_f0_q), .req_ghist(ghist_q),
    .resp_valid(bpd_rv), .resp_taken(bpd_taken), .resp_ctr(bpd_ctr), .resp_idx(bpd_idx),
    .upd_valid(res_valid && res_kind == BR_COND && res_bpd_valid),
    .upd_idx(res_bpd_idx), .upd_ctr(res_bpd_ctr), .upd_taken(res_taken));

  // ---------------- F1: pre-decode ----------------
  logic [31:0]           inst;
  logic [6:0]            opc;
  logic                  is_jal, is_jalr, is_br, is_call, is_ret;
  logic [VADDR_BITS-1:0] jal_tgt, br_tgt, pc_plus4_f1;
  logic                  f1_taken;
  logic [VADDR_BITS-1:0] f1_target;
  logic                  ras_valid;
  logic [VADDR_BITS-1:0] ras_top;
  logic                  f1_use_ras;

  assign inst        = imem_resp_inst;
  assign opc         = inst[6:0];
  assign is_jal      = (opc == 7'b1101111);
  assign is_jalr     = (opc == 7'b1100111);
  assign is_br       = (opc == 7'b1100011);
  // RISC-V link register convention: rd = x1/x5 is a call; jalr x0, x1/x5 a return
  assign is_call     = (is_jal || is_jalr) && (inst[11:7] == 5'd1 || inst[11:7] == 5'd5);
  assign is_ret      = is_jalr && inst[11:7] == 5'd0 && (inst[19:15] == 5'd1 || inst[19:15] == 5'd5);
  assign jal_tgt     = pc_f1_q + VADDR_BITS'(signed'({inst[31], inst[19:12], inst[20], inst[30:21], 1'b0}));
  assign br_tgt      = pc_f1_q + VADDR_BITS'(signed'({inst[31], inst[7], inst[30:25], inst[11:8], 1'b0}));
  assign pc_plus4_f1 = pc_f1_q + 4;

  always_comb begin
    f1_taken   = 1'b0;
    f1_target  = pc_plus4_f1;
    f1_use_ras = 1'b0;
    if (v_f1_q) begin
      if (is_ret && ras_valid) begin
        f1_taken = 1'b1; f1_target = ras_top; f1_use_ras = 1'b1;
      end else if (is_jal) begin
        f1_taken = 1'b1; f1_target = jal_tgt;
      end else if (is_jalr && btb_hit) begin
        f1_taken = 1'b1; f1_target = btb_target;
      end else if (is_br && btb_hit && btb_taken) begin
        f1_taken = 1'b1; f1_target = br_tgt;
      end
    end
  end

  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push(v_f1_q && is_call && !res_mispredict && !f2_redirect),
    .push_addr(pc_plus4_f1),
    .pop(v_f1_q && is_ret && !res_mispredict && !f2_redirect),
    .top_valid(ras_valid), .top(ras_top));

  // ---------------- F2: BPD override ----------------
  always_comb begin
    final_taken  = f1_taken_q;
    final_target = f1_target_q;
    if (isbr_f2_q && bpd_rv) begin
      final_taken  = bpd_taken;
      final_target = bpd_taken ? brtgt_f2_q : pc_f2_q + 4;
    end
    f2_redirect = v_f2_q && isbr_f2_q && bpd_rv && (bpd_taken != f1_taken_q);
  end

  assign out_valid       = v_f2_q && !res_mispredict;
  assign out_pc          = pc_f2_q;
  assign out_inst        = inst_f2_q;
  assign out_pred_taken  = final_taken;
  assign out_pred_target = final_target;
  assign out_btb_hit     = btb_hit_f2_q;
  assign out_btb_way     = btb_way_f2_q;
  assign out_btb_ctr     = btb_ctr_f2_q;
  assign out_bpd_valid   = bpd_rv;
  assign out_bpd_idx     = bpd_idx;
  assign out_bpd_ctr     = bpd_ctr;
  assign out_ghist       = ghist_f2_q;

  assign ev_mispredict   = res_valid && res_mispredict;
  assign ev_bpd_redirect = f2_redirect && !res_mispredict;
  assign ev_btb_redirect = v_f1_q && f1_taken && !f2_redirect && !res_mispredict;
  assign ev_ras_predict  = ev_btb_redirect && f1_use_ras;

  // ---------------- next PC and pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f0_q <= RESET_PC; pc_f1_q <= '0; pc_f2_q <= '0;
      v_f1_q <= 1'b0; v_f2_q <= 1'b0; started_q <= 1'b0;
      ghist_q <= '0; ghist_f1_q <= '0; ghist_f2_q <= '0;
      inst_f2_q <= '0; isbr_f2_q <= 1'b0; f1_taken_q <= 1'b0;
      f1_target_q <= '0; brtgt_f2_q <= '0;
      btb_hit_f2_q <= 1'b0; btb_way_f2_q <= '0; btb_ctr_f2_q <= '0;
    end else begin
      started_q <= 1'b1;
      // F1 -> F2 payload
      pc_f2_q      <= pc_f1_q;
      ghist_f2_q   <= ghist_f1_q;
      inst_f2_q    <= inst;
      isbr_f2_q    <= is_br;
      f1_taken_q   <= f1_taken;
      f1_target_q  <= f1_target;
      brtgt_f2_q   <= br_tgt;
      btb_hit_f2_q <= btb_hit && btb_rv;
      btb_way_f2_q <= btb_way;
      btb_ctr_f2_q <= btb_ctr;
      // F0 -> F1 payload
      pc_f1_q    <= pc_f0_q;
      ghist_f1_q <= ghist_q;

      if (res_valid && res_mispredict) begin
        pc_f0_q <= res_taken ? res_target : res_pc + 4;
        ghist_q <= (res_kind == BR_COND) ? {res_ghist[HIST_BITS-2:0], res_taken} : res_ghist;
        v_f1_q  <= 1'b0;
        v_f2_q  <= 1'b0;
      end else if (f2_redirect) begin
        pc_f0_q <= final_target;
        ghist_q <= {ghist_f2_q[HIST_BITS-2:0], final_taken};
        v_f1_q  <= 1'b0;
        v_f2_q  <= 1'b0;
      end else begin
        if (v_f2_q && isbr_f2_q) ghist_q <= {ghist_q[HIST_BITS-2:0], final_taken};
        if (v_f1_q && f1_taken) begin
          pc_f0_q <= f1_target;
          v_f1_q  <= 1'b0;
        end else if (started_q) begin
          pc_f0_q <= pc_f0_q + 4;
          v_f1_q  <= 1'b1;
        end
        v_f2_q <= v_f1_q;
      end
    end
  end

endmodule

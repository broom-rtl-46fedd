// tb_frontend: runs a small looping program (a call/return pair, an inner
// loop whose branch is taken twice then falls through, and a jump back)
// through the frontend with an instruction memory that answers in one
// cycle.  The testbench is the branch unit: it resolves every control-flow
// instruction one cycle after it leaves the frontend, using the
// architectural outcome, and flags mispredicts.  Checks that the delivered
// instruction stream is exactly the architectural one, that a frontend
// (F1) redirect costs one bubble and a predictor (F2) redirect two, and
// that BTB, RAS and BPD redirects and mispredict recovery all happen.
module tb_frontend;
  import broom_pkg::*;
  localparam logic [VADDR_BITS-1:0] BASE = 40'h8000_0000;
  logic clk = 0, rst_n = 0;
  logic imem_req_valid;
  logic [VADDR_BITS-1:0] imem_req_pc;
  logic [31:0] imem_resp_inst;
  logic out_valid, out_pred_taken, out_btb_hit, out_bpd_valid;
  logic [VADDR_BITS-1:0] out_pc, out_pred_target;
  logic [31:0] out_inst;
  logic [0:0] out_btb_way;
  logic [1:0] out_btb_ctr, out_bpd_ctr;
  logic [11:0] out_bpd_idx, out_ghist;
  logic res_valid = 0, res_taken = 0, res_mispredict = 0, res_btb_hit = 0, res_bpd_valid = 0;
  logic [VADDR_BITS-1:0] res_pc = '0, res_target = '0;
  br_kind_e res_kind = BR_COND;
  logic [0:0] res_btb_way = '0;
  logic [1:0] res_btb_ctr = '0, res_bpd_ctr = '0;
  logic [11:0] res_bpd_idx = '0, res_ghist = '0;
  logic ev_btb_redirect, ev_bpd_redirect, ev_ras_predict, ev_mispredict;
  int checks = 0, failures = 0;
  int n_btb = 0, n_bpd = 0, n_ras = 0, n_mis = 0, n_jal_gap = 0, n_bpd_gap = 0;

  frontend dut (.*);
  always #5 clk = ~clk;

  // ---- program ----
  function automatic logic [31:0] enc_jal(input int rd, input int off);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] enc_bne(input int off);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'd2, 5'd1, 3'b001, i[4:1], i[11], 7'b1100011};
  endfunction
  localparam logic [31:0] NOP = 32'h0000_0013, RET = 32'h0000_8067;

  logic [31:0] prog [64];
  initial begin
    for (int i = 0; i < 64; i++) prog[i] = NOP;
    prog[2]  = enc_jal(1, 64);     // call word 18
    prog[6]  = enc_bne(-8);        // inner loop back to word 4
    prog[7]  = enc_jal(0, -28);    // jump to word 0
    prog[19] = RET;                // return to word 3
  end

  always_ff @(posedge clk) imem_resp_inst <= prog[imem_req_pc[7:2]];

  // ---- architectural reference ----
  logic [VADDR_BITS-1:0] exp_pc;
  int loop_cnt = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last_out, gap_kind;      // cycle of the last delivered instruction
    logic p_valid, p_taken, p_mis, p_bh, p_bv;
    logic [VADDR_BITS-1:0] p_pc, p_tgt;
    br_kind_e p_kind;
    logic [0:0] p_bw;
    logic [1:0] p_bc, p_pc2;
    logic [11:0] p_bi, p_gh;
    exp_pc = BASE;
    last_out = 0; gap_kind = 0; p_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      // resolution of the instruction delivered last cycle
      res_valid = p_valid; res_pc = p_pc; res_kind = p_kind; res_taken = p_taken;
      res_target = p_tgt; res_mispredict = p_valid && p_mis;
      res_btb_hit = p_bh; res_btb_way = p_bw; res_btb_ctr = p_bc;
      res_bpd_valid = p_bv; res_bpd_idx = p_bi; res_bpd_ctr = p_pc2; res_ghist = p_gh;
      if (res_mispredict) gap_kind = 0;
      p_valid = 0;
      #1;
      n_btb += int'(ev_btb_redirect); n_bpd += int'(ev_bpd_redirect);
      n_ras += int'(ev_ras_predict);  n_mis += int'(ev_mispredict);
      if (out_valid) begin
        logic [31:0] ins;
        int w;
        logic [VADDR_BITS-1:0] nxt;
        logic taken, cf;
        br_kind_e k;
        w = int'(out_pc[7:2]);
        ins = prog[w];
        checks++;
        if (out_pc !== exp_pc || out_inst !== ins) begin
          failures++; $display("FAIL cyc %0d: pc %h exp %h", cyc, out_pc, exp_pc);
        end
        // bubble accounting for the previous instruction's redirect
        if (gap_kind != 0) begin
          checks++;
          if (cyc - last_out != gap_kind) begin
            failures++; $display("FAIL cyc %0d: gap %0d exp %0d", cyc, cyc - last_out, gap_kind);
          end
        end
        gap_kind = 0;
        if (w == 2 || w == 7) begin gap_kind = 2; n_jal_gap++; end     // F1 redirect: one bubble
        if (ev_bpd_redirect) begin gap_kind = 3; n_bpd_gap++; end        // F2 redirect: two bubbles
        last_out = cyc;
        // architectural outcome
        cf = 1; taken = 1; k = BR_JUMP; nxt = out_pc + 4;
        if (w == 2) begin k = BR_CALL; nxt = BASE + 18*4; end
        else if (w == 7) begin k = BR_JUMP; nxt = BASE; end
        else if (w == 19) begin k = BR_RET; nxt = BASE + 3*4; end
        else if (w == 6) begin
          k = BR_COND;
          taken = (loop_cnt < 2);
          loop_cnt = taken ? loop_cnt + 1 : 0;
          nxt = taken ? BASE + 4*4 : out_pc + 4;
        end else cf = 0;
        exp_pc = nxt;
        p_valid = cf; p_pc = out_pc; p_kind = k; p_taken = taken;
        p_tgt = (k == BR_COND) ? BASE + 4*4 : nxt;
        p_mis = out_pred_taken != taken || (taken && out_pred_target != nxt);
        p_bh = out_btb_hit; p_bw = out_btb_way; p_bc = out_btb_ctr;
        p_bv = out_bpd_valid; p_bi = out_bpd_idx; p_pc2 = out_bpd_ctr; p_gh = out_ghist;
      end
    end
    checks++;
    if (n_btb == 0 || n_bpd == 0 || n_ras == 0 || n_mis == 0 || n_jal_gap == 0 || n_bpd_gap == 0) begin
      failures++;
    end
    $display("events: btb %0d bpd %0d ras %0d mispredict %0d", n_btb, n_bpd, n_ras, n_mis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

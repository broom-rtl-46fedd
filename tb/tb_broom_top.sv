// tb_broom_top: end-to-end test of the whole chip at its default sizes.
// Three agents run at once:
//   * an instruction memory and branch unit drive the frontend through a
//     looping program with a call, a return, a jump and a loop branch, and
//     check the fetched stream and the redirect bubbles;
//   * rename and functional-unit models dispatch dependent integer, memory
//     and floating-point uops into the backend and check every operand;
//   * an L1 model and an outer memory exercise the 1 MiB L2 in its own
//     clock domain after stuck-at faults are placed in its SRAMs: the BIST
//     log must match, every read must be correct with assists on, and data
//     must be corrupted with assists off.
// Each mechanism (BTB, BPD and RAS redirects, mispredict recovery, dual
// issue, dispatch stall, L2 hit, miss, write-back, uncached set, recycled
// line, DCR/BB-S/LD/LR repairs, assist-off mode) is counted and must occur.
module tb_broom_top;
  import broom_pkg::*;
  localparam logic [VADDR_BITS-1:0] BASE = 40'h8000_0000;
  localparam int WAYS = 8;
  logic clk_core = 0, clk_l2 = 0, rst_core_n = 0, rst_l2_n = 0;
  always #5 clk_core = ~clk_core;
  always #7 clk_l2 = ~clk_l2;

  // frontend
  logic imem_req_valid;
  logic [VADDR_BITS-1:0] imem_req_pc;
  logic [31:0] imem_resp_inst;
  logic fetch_valid, fetch_pred_taken, fetch_btb_hit, fetch_bpd_valid;
  logic [VADDR_BITS-1:0] fetch_pc, fetch_pred_target;
  logic [31:0] fetch_inst;
  logic [0:0] fetch_btb_way;
  logic [1:0] fetch_btb_ctr, fetch_bpd_ctr;
  logic [11:0] fetch_bpd_idx, fetch_ghist;
  logic res_valid = 0, res_taken = 0, res_mispredict = 0, res_btb_hit = 0, res_bpd_valid = 0;
  logic [VADDR_BITS-1:0] res_pc = '0, res_target = '0;
  br_kind_e res_kind = BR_COND;
  logic [0:0] res_btb_way = '0;
  logic [1:0] res_btb_ctr = '0, res_bpd_ctr = '0;
  logic [11:0] res_bpd_idx = '0, res_ghist = '0;
  logic [3:0] fe_events;
  // backend
  logic [1:0] disp_valid = '0;
  iq_kind_e disp_kind [2];
  uop_t disp_uop [2];
  logic disp_ready;
  logic [3:0] exe_valid;
  uop_t exe_uop [4];
  logic [63:0] exe_rs1 [4], exe_rs2 [4], exe_rs3;
  logic [2:0] int_wb_valid = '0;
  logic [PREG_BITS-1:0] int_wb_pdst [3];
  logic [63:0] int_wb_data [3];
  logic [1:0] fp_wb_valid = '0;
  logic [PREG_BITS-1:0] fp_wb_pdst [2];
  logic [63:0] fp_wb_data [2];
  // L2
  logic l2_bist_start = 0, l2_assist_en = 1, l2_bist_done;
  logic l2_req_valid = 0, l2_req_ready, l2_req_we = 0;
  logic [31:0] l2_req_addr = '0;
  logic [63:0] l2_req_wdata = '0, l2_resp_rdata;
  logic [7:0] l2_req_wmask = '0;
  logic l2_resp_valid;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_wdata, mem_resp_rdata;
  logic [7:0] mem_req_wmask;
  logic [15:0] l2_log [4];
  logic [4:0] l2_events;

  broom_top dut (.*);

  int checks = 0, failures = 0;
  bit fe_done = 0, be_done = 0, l2_done = 0;
  int n_btb = 0, n_bpd = 0, n_ras = 0, n_mis = 0, n_jal_gap = 0, n_bpd_gap = 0;
  int n_dual = 0, n_mem = 0, n_fp = 0, n_stall = 0, n_uops = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_unc = 0, n_lr = 0, n_bad = 0;

  initial begin
    repeat (3) @(negedge clk_l2);
    rst_core_n = 1; rst_l2_n = 1;
  end

  initial begin
    repeat (3000000) @(posedge clk_core);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

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

  always_ff @(posedge clk_core) imem_resp_inst <= prog[imem_req_pc[7:2]];

  // ---- architectural reference ----
  logic [VADDR_BITS-1:0] exp_pc;
  int loop_cnt = 0;

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
    wait (rst_core_n);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk_core);
      // resolution of the instruction delivered last cycle
      res_valid = p_valid; res_pc = p_pc; res_kind = p_kind; res_taken = p_taken;
      res_target = p_tgt; res_mispredict = p_valid && p_mis;
      res_btb_hit = p_bh; res_btb_way = p_bw; res_btb_ctr = p_bc;
      res_bpd_valid = p_bv; res_bpd_idx = p_bi; res_bpd_ctr = p_pc2; res_ghist = p_gh;
      if (res_mispredict) gap_kind = 0;
      p_valid = 0;
      #1;
      n_btb += int'(fe_events[0]); n_bpd += int'(fe_events[1]);
      n_ras += int'(fe_events[2]);  n_mis += int'(fe_events[3]);
      if (fetch_valid) begin
        logic [31:0] ins;
        int w;
        logic [VADDR_BITS-1:0] nxt;
        logic taken, cf;
        br_kind_e k;
        w = int'(fetch_pc[7:2]);
        ins = prog[w];
        checks++;
        if (fetch_pc !== exp_pc || fetch_inst !== ins) begin
          failures++; $display("FAIL cyc %0d: pc %h exp %h", cyc, fetch_pc, exp_pc);
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
        if (fe_events[1]) begin gap_kind = 3; n_bpd_gap++; end        // F2 redirect: two bubbles
        last_out = cyc;
        // architectural outcome
        cf = 1; taken = 1; k = BR_JUMP; nxt = fetch_pc + 4;
        if (w == 2) begin k = BR_CALL; nxt = BASE + 18*4; end
        else if (w == 7) begin k = BR_JUMP; nxt = BASE; end
        else if (w == 19) begin k = BR_RET; nxt = BASE + 3*4; end
        else if (w == 6) begin
          k = BR_COND;
          taken = (loop_cnt < 2);
          loop_cnt = taken ? loop_cnt + 1 : 0;
          nxt = taken ? BASE + 4*4 : fetch_pc + 4;
        end else cf = 0;
        exp_pc = nxt;
        p_valid = cf; p_pc = fetch_pc; p_kind = k; p_taken = taken;
        p_tgt = (k == BR_COND) ? BASE + 4*4 : nxt;
        p_mis = fetch_pred_taken != taken || (taken && fetch_pred_target != nxt);
        p_bh = fetch_btb_hit; p_bw = fetch_btb_way; p_bc = fetch_btb_ctr;
        p_bv = fetch_bpd_valid; p_bi = fetch_bpd_idx; p_pc2 = fetch_bpd_ctr; p_gh = fetch_ghist;
      end
    end    fe_done = 1;
  end

  // expected register values and reuse bookkeeping
  logic [63:0] iv [70], fv [64];
  int icons [70], fcons [64];
  bit iprod [70], fprod [64];
  int inext = 1, fnext = 1;
  int irecent [$], frecent [$];

  // functional-unit delay lines: slot = cycles until writeback
  typedef struct { bit v; bit fp; int port; logic [6:0] pd; logic [63:0] d; } wbq_t;
  wbq_t pend [$];

  function automatic logic [63:0] alu(logic [63:0] a, logic [63:0] b, logic [19:0] imm);
    return a + b + 64'(imm);
  endfunction
  function automatic logic [63:0] ldu(logic [63:0] a, logic [63:0] b);
    return a ^ {b[62:0], 1'b1};
  endfunction
  function automatic logic [63:0] fpu(logic [63:0] a, logic [63:0] b, logic [63:0] c, logic [19:0] imm);
    return a + (b ^ {c[31:0], c[63:32]}) + 64'(imm);
  endfunction

  typedef struct { int due; bit fp; int port; logic [6:0] pd; logic [63:0] d; } ev_t;
  ev_t evq [$];

  int bcyc = 0;
  initial begin
    for (int i = 0; i < 70; i++) begin iv[i] = 0; icons[i] = 0; iprod[i] = 0; end
    for (int i = 0; i < 64; i++) begin fv[i] = 0; fcons[i] = 0; fprod[i] = 0; end
    irecent.push_back(0); frecent.push_back(0);
    for (int k = 0; k < 3; k++) begin int_wb_pdst[k] = '0; int_wb_data[k] = '0; end
    for (int k = 0; k < 2; k++) begin fp_wb_pdst[k] = '0; fp_wb_data[k] = '0; end
    disp_uop[0] = '0; disp_uop[1] = '0; disp_kind[0] = IQ_INT; disp_kind[1] = IQ_INT;
    wait (rst_core_n);
    // ---- directed: an independent uop reaches execute two bcycles after dispatch ----
    @(negedge clk_core);
    disp_valid = 2'b01; disp_kind[0] = IQ_INT; disp_uop[0] = '0; disp_uop[0].imm = 20'h5;
    @(negedge clk_core);
    disp_valid = 2'b00;
    #1 checks++; if (exe_valid[0]) begin failures++; $display("FAIL: executed too early"); end
    @(negedge clk_core);
    #1 checks++; if (!exe_valid[0] || exe_uop[0].imm != 20'h5) begin failures++; $display("FAIL: select+read latency"); end
    @(negedge clk_core);
    // ---- random dependent streams ----
    for (bcyc = 0; bcyc < 12000; bcyc++) begin
      int nwb_i, nwb_f;
      int ni;
      @(negedge clk_core);
      // writebacks due now
      int_wb_valid = '0; fp_wb_valid = '0;
      for (int i = 0; i < evq.size(); i++) begin
        if (evq[i].due == bcyc) begin
          if (evq[i].fp) begin
            fp_wb_valid[evq[i].port] = 1; fp_wb_pdst[evq[i].port] = evq[i].pd; fp_wb_data[evq[i].port] = evq[i].d;
            fprod[evq[i].pd] = 0;
          end else begin
            int_wb_valid[evq[i].port] = 1; int_wb_pdst[evq[i].port] = evq[i].pd; int_wb_data[evq[i].port] = evq[i].d;
            iprod[evq[i].pd] = 0;
          end
          evq.delete(i); i--;
        end
      end
      // dispatch group
      disp_valid = '0;
      if (bcyc % 3000 > 2600) begin end        // drain phase
      else if (disp_ready) begin
        for (int d = 0; d < 2; d++) begin
          uop_t u;
          int r;
          bit ok;
          u = '0;
          r = $urandom_range(0, 9);
          disp_kind[d] = (r < 6) ? IQ_INT : (r < 8) ? IQ_MEM : IQ_FP;
          if (bcyc % 3000 < 400 && d == 0) disp_kind[d] = IQ_MEM;   // floods the memory window
          u.imm = IMM_BITS'($urandom);
          u.dst_en = 1;
          if (disp_kind[d] == IQ_FP) begin
            u.prs1 = 7'(frecent[$urandom_range(0, frecent.size()-1)]);
            u.prs2 = 7'(frecent[$urandom_range(0, frecent.size()-1)]);
            u.prs3 = 7'(frecent[$urandom_range(0, frecent.size()-1)]);
            u.pdst = 7'(fnext);
            ok = (fcons[fnext] == 0) && !fprod[fnext];
          end else begin
            u.prs1 = 7'(irecent[$urandom_range(0, irecent.size()-1)]);
            u.prs2 = 7'(irecent[$urandom_range(0, irecent.size()-1)]);
            u.pdst = 7'(inext);
            ok = (icons[inext] == 0) && !iprod[inext];
          end
          if (!ok) break;
          disp_uop[d] = u;
          disp_valid[d] = 1;
          n_uops++;
          if (disp_kind[d] == IQ_FP) begin
            fcons[u.prs1]++; fcons[u.prs2]++; fcons[u.prs3]++;
            fv[u.pdst] = fpu(fv[u.prs1], fv[u.prs2], fv[u.prs3], u.imm);
            fprod[u.pdst] = 1;
            frecent.push_back(fnext); if (frecent.size() > 8) void'(frecent.pop_front());
            fnext = (fnext + 1) % 64;
          end else begin
            icons[u.prs1]++; icons[u.prs2]++;
            iv[u.pdst] = (disp_kind[d] == IQ_MEM) ? ldu(iv[u.prs1], iv[u.prs2]) : alu(iv[u.prs1], iv[u.prs2], u.imm);
            iprod[u.pdst] = 1;
            irecent.push_back(inext); if (irecent.size() > 8) void'(irecent.pop_front());
            inext = (inext == 69) ? 1 : inext + 1;
          end
        end
      end else n_stall++;
      #1;
      // execute stage: check operands, start the functional units
      ni = 0;
      for (int p = 0; p < 4; p++) if (exe_valid[p]) begin
        uop_t u;
        ev_t e;
        u = exe_uop[p];
        checks++;
        if (p < 3) begin
          if (exe_rs1[p] !== iv[u.prs1] || exe_rs2[p] !== iv[u.prs2]) begin
            failures++; $display("FAIL bcyc %0d port %0d: operands of p%0d wrong", bcyc, p, u.pdst);
          end
          icons[u.prs1]--; icons[u.prs2]--;
          e.fp = 0; e.port = p; e.pd = u.pdst;
          e.d = (p == 2) ? ldu(exe_rs1[p], exe_rs2[p]) : alu(exe_rs1[p], exe_rs2[p], u.imm);
          e.due = bcyc + ((p == 2) ? 3 : 1);
          if (p == 2) n_mem++; else ni++;
        end else begin
          if (exe_rs1[p] !== fv[u.prs1] || exe_rs2[p] !== fv[u.prs2] || exe_rs3 !== fv[u.prs3]) begin
            failures++; $display("FAIL bcyc %0d fp operands of p%0d wrong", bcyc, u.pdst);
          end
          fcons[u.prs1]--; fcons[u.prs2]--; fcons[u.prs3]--;
          e.fp = 1; e.port = 0; e.pd = u.pdst; e.d = fpu(exe_rs1[p], exe_rs2[p], exe_rs3, u.imm);
          e.due = bcyc + 4;
          n_fp++;
        end
        evq.push_back(e);
      end
      if (ni == 2) n_dual++;
    end    be_done = 1;
  end

  // ---------------- outer memory model ----------------
  logic [63:0] mem [logic [28:0]];
  logic [63:0] refm [logic [28:0]];
  function automatic logic [63:0] init_val(logic [28:0] a);
    return {3'b0, a, 3'b101, a} * 64'h9E37_79B9_7F4A_7C15;
  endfunction
  function automatic logic [63:0] rd_mem(logic [28:0] a);
    return mem.exists(a) ? mem[a] : init_val(a);
  endfunction

  logic        rq_v = 0;
  logic [28:0] rq_a;
  int          rq_cnt = 0;
  always_ff @(posedge clk_l2) begin
    mem_req_ready <= ($urandom_range(0, 3) != 0);
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin
        logic [63:0] o;
        o = rd_mem(mem_req_addr[31:3]);
        for (int b = 0; b < 8; b++) if (mem_req_wmask[b]) o[8*b +: 8] = mem_req_wdata[8*b +: 8];
        mem[mem_req_addr[31:3]] = o;
      end else begin
        rq_v <= 1'b1; rq_a <= mem_req_addr[31:3]; rq_cnt <= 2;
      end
    end
    if (rq_v) begin
      if (rq_cnt == 1) begin
        mem_resp_valid <= 1'b1; mem_resp_rdata <= rd_mem(rq_a); rq_v <= 1'b0;
      end
      rq_cnt <= rq_cnt - 1;
    end
  end

  always_ff @(posedge clk_l2) begin
    n_hit <= n_hit + int'(l2_events[0]); n_miss <= n_miss + int'(l2_events[1]);
    n_wb <= n_wb + int'(l2_events[2]); n_unc <= n_unc + int'(l2_events[3]);
    n_lr <= n_lr + int'(l2_events[4]);
  end

  // ---------------- client ----------------
  task automatic access(input bit we, input logic [31:0] a, input logic [63:0] d,
                        input logic [7:0] m, input bit expect_ok);
    int t;
    bit hit;
    logic [63:0] e;
    @(negedge clk_l2);
    l2_req_valid = 1; l2_req_we = we; l2_req_addr = a; l2_req_wdata = d; l2_req_wmask = m;
    while (!l2_req_ready) @(negedge clk_l2);
    @(negedge clk_l2);
    l2_req_valid = 0;
    t = 0;
    hit = l2_events[0];
    while (!l2_resp_valid) begin @(negedge clk_l2); t++; end
    if (hit) begin
      checks++;
      if (t != 0) begin failures++; $display("FAIL hit latency %0d", t); end
    end
    e = refm.exists(a[31:3]) ? refm[a[31:3]] : init_val(a[31:3]);
    if (we) begin
      for (int b = 0; b < 8; b++) if (m[b]) e[8*b +: 8] = d[8*b +: 8];
      refm[a[31:3]] = e;
    end else begin
      if (expect_ok) begin
        checks++;
        if (l2_resp_rdata !== e) begin failures++; $display("FAIL read %h: %h exp %h", a, l2_resp_rdata, e); end
      end else if (l2_resp_rdata !== e) n_bad++;
    end
  endtask

  function automatic logic [31:0] rand_addr();
    int set, tg, beat;
    set = $urandom_range(0, 7);
    tg = $urandom_range(0, 11);
    beat = $urandom_range(0, 7);
    return {15'(tg), 11'(set), 3'(beat), 3'b000};
  endfunction

  task automatic traffic(input int n, input bit expect_ok);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 2) == 0) access(1, rand_addr(), {$urandom, $urandom}, 8'($urandom), expect_ok);
      else                           access(0, rand_addr(), '0, '0, expect_ok);
    end
  endtask

  task automatic run_bist();
    @(negedge clk_l2); l2_bist_start = 1;
    @(negedge clk_l2); l2_bist_start = 0;
    while (!l2_bist_done) @(negedge clk_l2);
  endtask

  for (genvar w = 0; w < WAYS; w++) begin : g_set4
    initial begin
      #1;   // after the SRAM models have cleared their fault lists
      dut.u_l2.g_way[w].u_data.set_fault(8, 4*8+1, 7, 1'b1);
      dut.u_l2.g_way[w].u_data.set_fault(9, 4*8+2, 9, 1'b1);
    end
  end

  initial begin
    #1;   // after the SRAM models have cleared their fault lists
    // data SRAM address = {set, beat}; tag SRAM address = set
    // set 1 way 0: one faulty column (beats 3 and 5)            -> DCR
    dut.u_l2.g_way[0].u_data.set_fault(0, 1*8+3, 10, 1'b1);
    dut.u_l2.g_way[0].u_data.set_fault(1, 1*8+5, 10, 1'b0);
    // set 2 way 1: one faulty tag bit                              -> BB-S
    dut.u_l2.g_way[1].u_tag.set_fault(0, 2, 0, 1'b0);
    // set 3 ways 0..2: two data faults each, all in different places -> LD + LR
    dut.u_l2.g_way[0].u_data.set_fault(2, 3*8+0, 5, 1'b1);
    dut.u_l2.g_way[0].u_data.set_fault(3, 3*8+2, 40, 1'b0);
    dut.u_l2.g_way[1].u_data.set_fault(0, 3*8+0, 6, 1'b0);
    dut.u_l2.g_way[1].u_data.set_fault(1, 3*8+7, 63, 1'b1);
    dut.u_l2.g_way[2].u_data.set_fault(0, 3*8+1, 5, 1'b1);
    dut.u_l2.g_way[2].u_data.set_fault(1, 3*8+4, 0, 1'b0);
    // set 3 way 3: overlaps way 0                                  -> LD only
    dut.u_l2.g_way[3].u_data.set_fault(0, 3*8+0, 5, 1'b0);
    dut.u_l2.g_way[3].u_data.set_fault(1, 3*8+3, 1, 1'b1);
    // set 4: every way has the same two faulty bits                -> uncached set
    // (placed by the generate loop below)
    // set 5 way 5: two faulty tag bits                             -> LD
    dut.u_l2.g_way[5].u_tag.set_fault(0, 5, 1, 1'b1);
    dut.u_l2.g_way[5].u_tag.set_fault(1, 5, 2, 1'b0);

    wait (rst_l2_n);
    repeat (3) @(negedge clk_l2);
    checks++;
    if (l2_req_ready || l2_bist_done) begin failures++; $display("FAIL: ready before BIST"); end
    run_bist();
    checks++;
    if (l2_log[0] != 13 || l2_log[1] != 1 || l2_log[2] != 1 || l2_log[3] != 1) begin
      failures++; $display("FAIL BIST log ld=%0d dcr=%0d bbs=%0d lr=%0d", l2_log[0], l2_log[1], l2_log[2], l2_log[3]);
    end
    traffic(1500, 1'b1);
    // uncached set 4 and the recycled line of set 3
    for (int i = 0; i < 20; i++) begin
      access(1, {15'(i), 11'd3, 3'(i), 3'b0}, {$urandom, $urandom}, 8'hff, 1'b1);
      access(0, {15'(i), 11'd3, 3'(i), 3'b0}, '0, '0, 1'b1);
      access(0, {15'(i), 11'd4, 3'(i), 3'b0}, '0, '0, 1'b1);
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_wb == 0 || n_unc == 0 || n_lr == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("assisted: hits %0d misses %0d writebacks %0d uncached %0d recycled %0d", n_hit, n_miss, n_wb, n_unc, n_lr);
    // ---- same faults, assists off (tag faults removed: they would make the
    // unassisted cache miss forever) ----
    dut.u_l2.g_way[1].u_tag.clear_faults();
    dut.u_l2.g_way[5].u_tag.clear_faults();
    // flush the cache contents into the reference first: dirty data is lost
    // by a BIST, so restart the reference from what memory holds
    l2_assist_en = 0;
    run_bist();
    foreach (refm[a]) refm[a] = rd_mem(a);
    checks++;
    if (l2_log[0] != 0 || l2_log[1] != 0 || l2_log[2] != 0 || l2_log[3] != 0) begin failures++; $display("FAIL: log with assists off"); end
    traffic(1500, 1'b0);
    checks++;
    if (n_bad == 0) begin failures++; $display("FAIL: no corruption without assists"); end
    $display("unassisted: corrupted reads %0d", n_bad);
    l2_done = 1;
  end

  initial begin
    wait (fe_done && be_done && l2_done);
    checks++;
    if (n_btb == 0 || n_bpd == 0 || n_ras == 0 || n_mis == 0 || n_jal_gap == 0 || n_bpd_gap == 0) begin
      failures++; $display("FAIL frontend coverage");
    end
    checks++;
    if (n_dual == 0 || n_mem == 0 || n_fp == 0 || n_stall == 0) begin failures++; $display("FAIL backend coverage"); end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_wb == 0 || n_unc == 0 || n_lr == 0 || n_bad == 0) begin
      failures++; $display("FAIL L2 coverage");
    end
    $display("frontend: btb redirects %0d bpd redirects %0d ras %0d mispredicts %0d", n_btb, n_bpd, n_ras, n_mis);
    $display("backend: uops %0d dual-issue %0d mem %0d fp %0d stalls %0d", n_uops, n_dual, n_mem, n_fp, n_stall);
    $display("L2: hits %0d misses %0d writebacks %0d uncached %0d recycled %0d corrupted-unassisted %0d",
             n_hit, n_miss, n_wb, n_unc, n_lr, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

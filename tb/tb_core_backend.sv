// tb_core_backend: dispatches random dependent uop streams (integer, memory
// and floating point) into the backend and acts as the functional units:
// integer ALUs with 1-cycle, the load unit with 3-cycle and the FPU with
// 4-cycle latency, each writing back on its own port.  Every operand that
// leaves the register-read stage is compared with the value the
// testbench computed at dispatch, which checks renaming through the busy
// tables, wakeup, oldest-first select, register read and writeback.  Also
// checks the two-cycle issue-to-execute timing of an independent uop, and
// that dual issue, memory and FP issue and dispatch stalls all occur.
module tb_core_backend;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0;
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
  logic [4:0] iq_int_occ, iq_mem_occ, iq_fp_occ;

  core_backend dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dual = 0, n_mem = 0, n_fp = 0, n_stall = 0, n_uops = 0;

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

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  initial begin
    for (int i = 0; i < 70; i++) begin iv[i] = 0; icons[i] = 0; iprod[i] = 0; end
    for (int i = 0; i < 64; i++) begin fv[i] = 0; fcons[i] = 0; fprod[i] = 0; end
    irecent.push_back(0); frecent.push_back(0);
    for (int k = 0; k < 3; k++) begin int_wb_pdst[k] = '0; int_wb_data[k] = '0; end
    for (int k = 0; k < 2; k++) begin fp_wb_pdst[k] = '0; fp_wb_data[k] = '0; end
    disp_uop[0] = '0; disp_uop[1] = '0; disp_kind[0] = IQ_INT; disp_kind[1] = IQ_INT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- directed: an independent uop reaches execute two cycles after dispatch ----
    @(negedge clk);
    disp_valid = 2'b01; disp_kind[0] = IQ_INT; disp_uop[0] = '0; disp_uop[0].imm = 20'h5;
    @(negedge clk);
    disp_valid = 2'b00;
    #1 checks++; if (exe_valid[0]) begin failures++; $display("FAIL: executed too early"); end
    @(negedge clk);
    #1 checks++; if (!exe_valid[0] || exe_uop[0].imm != 20'h5) begin failures++; $display("FAIL: select+read latency"); end
    @(negedge clk);
    // ---- random dependent streams ----
    for (cyc = 0; cyc < 30000; cyc++) begin
      int nwb_i, nwb_f;
      int ni;
      @(negedge clk);
      // writebacks due now
      int_wb_valid = '0; fp_wb_valid = '0;
      for (int i = 0; i < evq.size(); i++) begin
        if (evq[i].due == cyc) begin
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
      if (cyc % 3000 > 2600) begin end        // drain phase
      else if (disp_ready) begin
        for (int d = 0; d < 2; d++) begin
          uop_t u;
          int r;
          bit ok;
          u = '0;
          r = $urandom_range(0, 9);
          disp_kind[d] = (r < 6) ? IQ_INT : (r < 8) ? IQ_MEM : IQ_FP;
          if (cyc % 3000 < 400 && d == 0) disp_kind[d] = IQ_MEM;   // floods the memory window
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
            failures++; $display("FAIL cyc %0d port %0d: operands of p%0d wrong", cyc, p, u.pdst);
          end
          icons[u.prs1]--; icons[u.prs2]--;
          e.fp = 0; e.port = p; e.pd = u.pdst;
          e.d = (p == 2) ? ldu(exe_rs1[p], exe_rs2[p]) : alu(exe_rs1[p], exe_rs2[p], u.imm);
          e.due = cyc + ((p == 2) ? 3 : 1);
          if (p == 2) n_mem++; else ni++;
        end else begin
          if (exe_rs1[p] !== fv[u.prs1] || exe_rs2[p] !== fv[u.prs2] || exe_rs3 !== fv[u.prs3]) begin
            failures++; $display("FAIL cyc %0d fp operands of p%0d wrong", cyc, u.pdst);
          end
          fcons[u.prs1]--; fcons[u.prs2]--; fcons[u.prs3]--;
          e.fp = 1; e.port = 0; e.pd = u.pdst; e.d = fpu(exe_rs1[p], exe_rs2[p], exe_rs3, u.imm);
          e.due = cyc + 4;
          n_fp++;
        end
        evq.push_back(e);
      end
      if (ni == 2) n_dual++;
    end
    checks++;
    if (n_dual == 0 || n_mem == 0 || n_fp == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("uops %0d dual-issue cycles %0d mem %0d fp %0d dispatch stalls %0d", n_uops, n_dual, n_mem, n_fp, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_btb: directed checks of the branch target buffer: invalid after reset,
// allocation of taken branches, hysteresis counting, always-taken jumps,
// two ways per set with round-robin replacement, partial-tag matching, the
// one-cycle lookup latency and a lookup dropped by a same-cycle update.
// A random phase then runs lookup/update pairs on a pool of branches that
// share a few sets, against a reference model of the entries, the
// hysteresis counters and the round-robin victim choice.
module tb_btb;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, upd_valid = 0, upd_taken = 0, upd_was_hit = 0;
  logic [VADDR_BITS-1:0] req_pc = '0, upd_pc = '0, upd_target = '0;
  br_kind_e upd_kind = BR_COND;
  logic [0:0] upd_way = '0;
  logic [1:0] upd_ctr = '0;
  logic resp_valid, resp_hit, resp_taken;
  logic [VADDR_BITS-1:0] resp_target;
  br_kind_e resp_kind;
  logic [0:0] resp_way;
  logic [1:0] resp_ctr;
  int checks = 0, failures = 0;

  btb #(.SETS(128), .WAYS(2), .TAG_BITS(12)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // lookup: returns the response seen one cycle later
  task automatic look(input logic [VADDR_BITS-1:0] pc, output logic hit, output logic tk,
                      output logic [VADDR_BITS-1:0] tgt, output logic [0:0] way,
                      output logic [1:0] ctr);
    @(negedge clk); req_valid = 1; req_pc = pc;
    @(negedge clk); req_valid = 0;
    chk(resp_valid, "resp_valid one cycle after the request");
    hit = resp_hit; tk = resp_taken; tgt = resp_target; way = resp_way; ctr = resp_ctr;
  endtask

  task automatic upd(input logic [VADDR_BITS-1:0] pc, input logic [VADDR_BITS-1:0] tgt,
                     input br_kind_e k, input logic taken, input logic was_hit,
                     input logic [0:0] way, input logic [1:0] ctr);
    @(negedge clk);
    upd_valid = 1; upd_pc = pc; upd_target = tgt; upd_kind = k; upd_taken = taken;
    upd_was_hit = was_hit; upd_way = way; upd_ctr = ctr;
    @(negedge clk); upd_valid = 0;
  endtask

  logic h, t; logic [VADDR_BITS-1:0] g; logic [0:0] w; logic [1:0] c;
  // three branches in the same set (index bits 8:2 equal), different tags
  localparam logic [VADDR_BITS-1:0] PA = 40'h8000_0040, PB = 40'h8000_2040, PC = 40'h8000_4040;

  // reference model for the random phase
  logic                  mv   [128][2];
  logic [11:0]           mtag [128][2];
  logic [VADDR_BITS-1:0] mtgt [128][2];
  br_kind_e              mknd [128][2];
  logic [1:0]            mctr [128][2];
  int                    mrr;

  task automatic random_phase();
    logic [VADDR_BITS-1:0] pool [16];
    br_kind_e pk [16];
    // fresh state: reset the BTB and wait for the invalidation sweep
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    repeat (130) @(negedge clk);
    for (int i = 0; i < 128; i++) for (int j = 0; j < 2; j++) mv[i][j] = 0;
    mrr = 0;
    // 16 branches over 4 sets, distinct partial tags
    for (int i = 0; i < 16; i++) begin
      pool[i] = 40'h80_0000_0000 | (VADDR_BITS'(i / 4) << 11) | (VADDR_BITS'(i % 4 + 8) << 2);
      pk[i]   = (i % 5 == 0) ? BR_JUMP : BR_COND;
    end
    for (int it = 0; it < 3000; it++) begin
      int k, st, hw; logic mh, tk; logic [VADDR_BITS-1:0] tgt;
      k  = $urandom_range(15);
      st = int'(pool[k][8:2]);
      hw = -1;
      for (int j = 1; j >= 0; j--)
        if (mv[st][j] && mtag[st][j] == pool[k][20:9]) hw = j;
      mh = (hw >= 0);
      look(pool[k], h, t, g, w, c);
      chk(h == mh, "random: hit matches model");
      if (mh) begin
        chk(w == 1'(hw) && g == mtgt[st][hw] && c == mctr[st][hw] && resp_kind == mknd[st][hw],
            "random: entry matches model");
        chk(t == (mknd[st][hw] != BR_COND || mctr[st][hw][1]), "random: direction from counter");
      end
      tk  = (pk[k] != BR_COND) || ($urandom_range(99) < 60);
      tgt = pool[k] + VADDR_BITS'(4 * $urandom_range(1, 64));
      upd(pool[k], tgt, pk[k], tk, h, w, c);
      if (mh) begin
        mtgt[st][hw] = tgt;
        if (tk) mctr[st][hw] = (mctr[st][hw] == 2'b11) ? 2'b11 : mctr[st][hw] + 2'd1;
        else    mctr[st][hw] = (mctr[st][hw] == 2'b00) ? 2'b00 : mctr[st][hw] - 2'd1;
      end else if (tk) begin
        mv[st][mrr] = 1; mtag[st][mrr] = pool[k][20:9]; mtgt[st][mrr] = tgt;
        mknd[st][mrr] = pk[k]; mctr[st][mrr] = 2'b10;
        mrr = 1 - mrr;
      end
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (130) @(negedge clk);          // invalidation sweep
    look(PA, h, t, g, w, c); chk(!h, "miss after reset");
    upd(PA, 40'h8000_1000, BR_COND, 1'b0, 1'b0, '0, '0);
    look(PA, h, t, g, w, c); chk(!h, "not-taken miss does not allocate");
    upd(PA, 40'h8000_1000, BR_COND, 1'b1, 1'b0, '0, '0);
    look(PA, h, t, g, w, c);
    chk(h && t && g == 40'h8000_1000 && c == 2'b10, "allocated weakly taken");
    upd(PA, 40'h8000_1000, BR_COND, 1'b0, 1'b1, w, c);
    look(PA, h, t, g, w, c); chk(h && !t && c == 2'b01, "hysteresis to weakly not-taken");
    upd(PA, 40'h8000_1000, BR_COND, 1'b0, 1'b1, w, c);
    look(PA, h, t, g, w, c); chk(h && !t && c == 2'b00, "strongly not-taken");
    upd(PA, 40'h8000_1000, BR_COND, 1'b0, 1'b1, w, c);
    look(PA, h, t, g, w, c); chk(h && c == 2'b00, "counter saturates at 0");
    // second branch in the same set goes to the other way
    upd(PB, 40'h8000_3000, BR_JUMP, 1'b1, 1'b0, '0, '0);
    look(PB, h, t, g, w, c); chk(h && t && g == 40'h8000_3000 && resp_kind == BR_JUMP, "jump hit");
    look(PA, h, t, g, w, c); chk(h && g == 40'h8000_1000, "first way kept");
    // third branch replaces round-robin (way 0 = PA)
    upd(PC, 40'h8000_5000, BR_RET, 1'b1, 1'b0, '0, '0);
    look(PC, h, t, g, w, c); chk(h && t && resp_kind == BR_RET && g == 40'h8000_5000, "third allocated");
    look(PA, h, t, g, w, c); chk(!h, "round-robin victim evicted");
    look(PB, h, t, g, w, c); chk(h, "other way kept");
    // partial tag: an address differing only above the tag bits aliases
    look(PB ^ 40'h10_0000_0000, h, t, g, w, c); chk(h, "partial tag aliasing");
    // strong taken saturation
    upd(PA, 40'h8000_7000, BR_COND, 1'b1, 1'b0, '0, '0);
    look(PA, h, t, g, w, c);
    upd(PA, 40'h8000_7000, BR_COND, 1'b1, 1'b1, w, c);
    look(PA, h, t, g, w, c); chk(h && t && c == 2'b11, "strongly taken");
    upd(PA, 40'h8000_7000, BR_COND, 1'b1, 1'b1, w, c);
    look(PA, h, t, g, w, c); chk(c == 2'b11, "counter saturates at 3");
    // lookup in the same cycle as an update is dropped
    @(negedge clk); req_valid = 1; req_pc = PB; upd_valid = 1; upd_pc = PC; upd_taken = 1;
    upd_was_hit = 1; upd_kind = BR_RET; upd_way = '0; upd_ctr = 2'b10; upd_target = 40'h8000_5000;
    @(negedge clk); req_valid = 0; upd_valid = 0;
    chk(!resp_valid, "lookup dropped by update");
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

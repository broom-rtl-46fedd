// tb_issue_window: drives a 16-entry, two-issue-port window with random
// dispatches and wakeups and compares every issued uop with a reference
// in-order list model: each cycle the two oldest ready uops must issue,
// a woken uop issues no earlier than the next cycle, and disp_ready must
// follow occupancy.  Also checks that a full window fills completely.
module tb_issue_window;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] disp_valid = '0;
  uop_t disp_uop [2];
  logic disp_ready;
  wakeup_t wb [3];
  logic [1:0] iss_valid;
  uop_t iss_uop [2];
  logic [4:0] occupancy;
  uop_t q [$];
  int checks = 0, failures = 0, issued = 0, dual = 0, full = 0;
  int tag = 0;

  issue_window #(.ENTRIES(16), .ISSUE(2), .DISP(2), .NWB(3)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit rdy(uop_t u);
    return !u.p1_busy && !u.p2_busy && !u.p3_busy;
  endfunction

  function automatic uop_t wk(uop_t u, wakeup_t w [3]);
    for (int k = 0; k < 3; k++) if (w[k].valid) begin
      if (w[k].pdst == u.prs1) u.p1_busy = 0;
      if (w[k].pdst == u.prs2) u.p2_busy = 0;
      if (w[k].pdst == u.prs3) u.p3_busy = 0;
    end
    return u;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) wb[k] = '0;
    disp_uop[0] = '0; disp_uop[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int ni;
      bit phase_fill;
      @(negedge clk);
      phase_fill = (n % 1000) < 100;   // no wakeups: the window fills up
      // inputs for this cycle
      for (int d = 0; d < 2; d++) begin
        disp_uop[d] = '0;
        disp_uop[d].rob_idx = ROB_BITS'(tag + d);
        disp_uop[d].imm = IMM_BITS'(tag + d);
        disp_uop[d].prs1 = PREG_BITS'($urandom_range(1, 20));
        disp_uop[d].prs2 = PREG_BITS'($urandom_range(1, 20));
        disp_uop[d].prs3 = '0;
        disp_uop[d].p1_busy = 1'($urandom_range(0, 2) == 0);
        disp_uop[d].p2_busy = 1'($urandom_range(0, 2) == 0);
      end
      disp_valid = disp_ready ? 2'($urandom) : 2'b00;
      if (disp_valid == 2'b10) disp_valid = 2'b01;
      for (int k = 0; k < 3; k++) begin
        wb[k].valid = !phase_fill && 1'($urandom);
        wb[k].pdst = PREG_BITS'($urandom_range(1, 20));
      end
      #1;
      // expected issue: the oldest ready entries in the current contents
      ni = 0;
      checks++;
      if (disp_ready !== (q.size() + 2 <= 16) || occupancy !== 5'(q.size())) begin
        failures++; $display("FAIL ready/occupancy size=%0d occ=%0d", q.size(), occupancy);
      end
      if (q.size() == 16) full++;
      for (int i = 0; i < q.size() && ni < 2; i++) begin
        if (rdy(q[i])) begin
          checks++;
          if (!iss_valid[ni] || iss_uop[ni] !== q[i]) begin
            failures++; $display("FAIL n=%0d port %0d: got imm %0d exp %0d", n, ni, iss_uop[ni].imm, q[i].imm);
          end
          q.delete(i);
          i--;
          ni++;
          issued++;
        end
      end
      if (ni == 2) dual++;
      for (int p = ni; p < 2; p++) begin
        checks++;
        if (iss_valid[p]) begin failures++; $display("FAIL n=%0d spurious issue on %0d", n, p); end
      end
      foreach (q[i]) q[i] = wk(q[i], wb);
      for (int d = 0; d < 2; d++) if (disp_valid[d]) begin q.push_back(wk(disp_uop[d], wb)); end
      tag += 2;
    end
    checks++;
    if (issued < 1000 || dual == 0 || full == 0) begin failures++; $display("FAIL coverage %0d %0d %0d", issued, dual, full); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_l2_cache: places stuck-at faults in the tag and data SRAMs of a
// reduced L2 (64 sets, 8 ways), runs the boot-time BIST and checks its error
// log, then runs random reads and byte-masked writes against a reference
// memory.  The faults are chosen so that every assist is needed: a
// single-column data fault (DCR), a single-bit tag fault that would alias two tags (BB-S), lines with
// two data faults (LD), three of them with disjoint faults (LR), and a set
// whose every line is disabled (uncached access).  All reads must return
// the reference data.  Hit latency (one cycle after acceptance) is checked.
// Finally the BIST is rerun with the assists off and the same traffic must
// now return corrupted data, which shows that the faults are real.
module tb_l2_cache;
  import broom_pkg::*;
  localparam int SETS = 64, WAYS = 8;
  logic clk = 0, rst_n = 0;
  logic bist_start = 0, assist_en = 1, bist_busy, bist_done;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [31:0] req_addr = '0;
  logic [63:0] req_wdata = '0, resp_rdata;
  logic [7:0] req_wmask = '0;
  logic resp_valid;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_wdata, mem_resp_rdata;
  logic [7:0] mem_req_wmask;
  logic [15:0] log_ld, log_dcr, log_bbs, log_lr;
  logic ev_hit, ev_miss, ev_writeback, ev_uncached, ev_recycled_access;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_unc = 0, n_lr = 0, n_bad = 0;

  l2_cache #(.WAYS(WAYS), .SETS(SETS), .BEATS(8), .PADDR(32)) dut (.*);
  always #5 clk = ~clk;

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
  always_ff @(posedge clk) begin
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

  always_ff @(posedge clk) begin
    n_hit <= n_hit + int'(ev_hit); n_miss <= n_miss + int'(ev_miss);
    n_wb <= n_wb + int'(ev_writeback); n_unc <= n_unc + int'(ev_uncached);
    n_lr <= n_lr + int'(ev_recycled_access);
  end

  // ---------------- client ----------------
  task automatic access(input bit we, input logic [31:0] a, input logic [63:0] d,
                        input logic [7:0] m, input bit expect_ok);
    int t;
    bit hit;
    logic [63:0] e;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d; req_wmask = m;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    t = 0;
    hit = ev_hit;
    while (!resp_valid) begin @(negedge clk); t++; end
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
        if (resp_rdata !== e) begin failures++; $display("FAIL read %h: %h exp %h", a, resp_rdata, e); end
      end else if (resp_rdata !== e) n_bad++;
    end
  endtask

  function automatic logic [31:0] rand_addr();
    int set, tg, beat;
    set = $urandom_range(0, 7);
    tg = $urandom_range(0, 11);
    beat = $urandom_range(0, 7);
    return {20'(tg), 6'(set), 3'(beat), 3'b000};
  endfunction

  task automatic traffic(input int n, input bit expect_ok);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 2) == 0) access(1, rand_addr(), {$urandom, $urandom}, 8'($urandom), expect_ok);
      else                           access(0, rand_addr(), '0, '0, expect_ok);
    end
  endtask

  task automatic run_bist();
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    while (!bist_done) @(negedge clk);
  endtask

  for (genvar w = 0; w < WAYS; w++) begin : g_set4
    initial begin
      #1;   // after the SRAM models have cleared their fault lists
      dut.g_way[w].u_data.set_fault(8, 4*8+1, 7, 1'b1);
      dut.g_way[w].u_data.set_fault(9, 4*8+2, 9, 1'b1);
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1;   // after the SRAM models have cleared their fault lists
    // data SRAM address = {set, beat}; tag SRAM address = set
    // set 1 way 0: one faulty column (beats 3 and 5)            -> DCR
    dut.g_way[0].u_data.set_fault(0, 1*8+3, 10, 1'b1);
    dut.g_way[0].u_data.set_fault(1, 1*8+5, 10, 1'b0);
    // set 2 way 1: one faulty tag bit                              -> BB-S
    dut.g_way[1].u_tag.set_fault(0, 2, 0, 1'b0);
    // set 3 ways 0..2: two data faults each, all in different places -> LD + LR
    dut.g_way[0].u_data.set_fault(2, 3*8+0, 5, 1'b1);
    dut.g_way[0].u_data.set_fault(3, 3*8+2, 40, 1'b0);
    dut.g_way[1].u_data.set_fault(0, 3*8+0, 6, 1'b0);
    dut.g_way[1].u_data.set_fault(1, 3*8+7, 63, 1'b1);
    dut.g_way[2].u_data.set_fault(0, 3*8+1, 5, 1'b1);
    dut.g_way[2].u_data.set_fault(1, 3*8+4, 0, 1'b0);
    // set 3 way 3: overlaps way 0                                  -> LD only
    dut.g_way[3].u_data.set_fault(0, 3*8+0, 5, 1'b0);
    dut.g_way[3].u_data.set_fault(1, 3*8+3, 1, 1'b1);
    // set 4: every way has the same two faulty bits                -> uncached set
    // (placed by the generate loop below)
    // set 5 way 5: two faulty tag bits                             -> LD
    dut.g_way[5].u_tag.set_fault(0, 5, 1, 1'b1);
    dut.g_way[5].u_tag.set_fault(1, 5, 2, 1'b0);

    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (req_ready || bist_done) begin failures++; $display("FAIL: ready before BIST"); end
    run_bist();
    checks++;
    if (log_ld != 13 || log_dcr != 1 || log_bbs != 1 || log_lr != 1) begin
      failures++; $display("FAIL BIST log ld=%0d dcr=%0d bbs=%0d lr=%0d", log_ld, log_dcr, log_bbs, log_lr);
    end
    traffic(4000, 1'b1);
    // uncached set 4 and the recycled line of set 3
    for (int i = 0; i < 20; i++) begin
      access(1, {20'(i), 6'd3, 3'(i), 3'b0}, {$urandom, $urandom}, 8'hff, 1'b1);
      access(0, {20'(i), 6'd3, 3'(i), 3'b0}, '0, '0, 1'b1);
      access(0, {20'(i), 6'd4, 3'(i), 3'b0}, '0, '0, 1'b1);
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_wb == 0 || n_unc == 0 || n_lr == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("assisted: hits %0d misses %0d writebacks %0d uncached %0d recycled %0d", n_hit, n_miss, n_wb, n_unc, n_lr);
    // ---- same faults, assists off (tag faults removed: they would make the
    // unassisted cache miss forever) ----
    dut.g_way[1].u_tag.clear_faults();
    dut.g_way[5].u_tag.clear_faults();
    // flush the cache contents into the reference first: dirty data is lost
    // by a BIST, so restart the reference from what memory holds
    assist_en = 0;
    run_bist();
    foreach (refm[a]) refm[a] = rd_mem(a);
    checks++;
    if (log_ld != 0 || log_dcr != 0 || log_bbs != 0 || log_lr != 0) begin failures++; $display("FAIL: log with assists off"); end
    traffic(3000, 1'b0);
    checks++;
    if (n_bad == 0) begin failures++; $display("FAIL: no corruption without assists"); end
    $display("unassisted: corrupted reads %0d", n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

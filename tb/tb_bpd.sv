// tb_bpd: random lookups and updates against a reference table of 4096
// two-bit counters indexed by fetch address XOR global history.  Checks the
// two-cycle prediction latency, the reset value (weakly not-taken),
// counter updates through the folded square tables, and predictions dropped
// when an update takes the single SRAM port.
module tb_bpd;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, upd_valid = 0, upd_taken = 0;
  logic [VADDR_BITS-1:0] req_pc = '0;
  logic [11:0] req_ghist = '0, upd_idx = '0, resp_idx;
  logic [1:0] upd_ctr = '0, resp_ctr;
  logic resp_valid, resp_taken;
  logic [1:0] model [4096];
  int checks = 0, failures = 0, drops = 0, preds = 0;

  bpd #(.HIST_BITS(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic        rq [3];     // request made 0/1/2 cycles ago
  logic [11:0] ri [3];
  logic [1:0]  re [3];
  logic        rdrop [3];

  initial begin
    for (int i = 0; i < 4096; i++) model[i] = 2'b01;
    for (int k = 0; k < 3; k++) begin rq[k] = 0; ri[k] = 0; re[k] = 0; rdrop[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (70) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // shift request history: index 1 = made last cycle, 2 = two cycles ago
      rq[2] = rq[1]; ri[2] = ri[1]; re[2] = re[1]; rdrop[2] = rdrop[1];
      rq[1] = rq[0]; ri[1] = ri[0];
      re[1] = model[ri[1]];            // model holds every update up to that request
      // check the prediction for the request two cycles ago
      if (rq[2]) begin
        checks++;
        if (rdrop[2]) begin
          drops++;
          if (resp_valid) begin failures++; $display("FAIL: not dropped"); end
        end else begin
          preds++;
          if (!resp_valid || resp_ctr !== re[2] || resp_idx !== ri[2] || resp_taken !== re[2][1]) begin
            failures++;
            $display("FAIL n=%0d idx=%h got v=%b ctr=%b exp %b", n, ri[2], resp_valid, resp_ctr, re[2]);
          end
        end
      end
      // new inputs for this cycle
      req_valid = 1'($urandom_range(0, 3) != 0);
      req_pc = {8'h0, $urandom} & 40'h00_0000_3ffc;
      req_ghist = 12'($urandom);
      rq[0] = req_valid;
      ri[0] = req_pc[13:2] ^ req_ghist;
      upd_valid = ($urandom_range(0, 4) == 0);
      rdrop[1] = upd_valid;            // the request from last cycle reads now
      upd_idx = (n % 2) ? ri[2] : 12'($urandom);
      upd_ctr = model[upd_idx];
      upd_taken = 1'($urandom);
      if (upd_valid) begin
        if (upd_taken && model[upd_idx] != 3) model[upd_idx] = model[upd_idx] + 1;
        if (!upd_taken && model[upd_idx] != 0) model[upd_idx] = model[upd_idx] - 1;
      end
    end
    checks++;
    if (drops == 0 || preds < 1000) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

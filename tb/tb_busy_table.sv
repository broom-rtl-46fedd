// tb_busy_table: random allocations, writebacks and source reads against a
// reference bit vector; checks writeback bypass, intra-group dependences
// and the never-busy zero register.
module tb_busy_table;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] alloc_valid;
  logic [PREG_BITS-1:0] alloc_preg [2];
  logic [PREG_BITS-1:0] rd_preg [2][2];
  logic rd_busy [2][2];
  wakeup_t wb [3];
  bit model [70];
  int checks = 0, failures = 0, byp = 0, grp = 0;

  busy_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 70; i++) model[i] = 0;
    alloc_valid = '0;
    for (int d = 0; d < 2; d++) begin
      alloc_preg[d] = '0; rd_preg[d][0] = '0; rd_preg[d][1] = '0;
    end
    for (int k = 0; k < 3; k++) wb[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10000; n++) begin
      bit after [70];
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        alloc_valid[d] = 1'($urandom);
        alloc_preg[d] = PREG_BITS'($urandom_range(0, 69));
        for (int s = 0; s < 2; s++) begin
          rd_preg[d][s] = PREG_BITS'($urandom_range(0, 69));
          if (d == 1 && $urandom_range(0, 3) == 0) rd_preg[d][s] = alloc_preg[0];
        end
      end
      for (int k = 0; k < 3; k++) begin
        wb[k].valid = 1'($urandom);
        wb[k].pdst = PREG_BITS'($urandom_range(0, 69));
        if ($urandom_range(0, 3) == 0) wb[k].pdst = rd_preg[0][0];
      end
      after = model;
      for (int k = 0; k < 3; k++) if (wb[k].valid) after[wb[k].pdst] = 0;
      #1;
      for (int d = 0; d < 2; d++)
        for (int s = 0; s < 2; s++) begin
          bit e;
          e = after[rd_preg[d][s]];
          if (model[rd_preg[d][s]] && !e) byp++;
          if (d == 1 && alloc_valid[0] && alloc_preg[0] == rd_preg[d][s]) begin e = 1; grp++; end
          if (rd_preg[d][s] == 0) e = 0;
          checks++;
          if (rd_busy[d][s] !== e) begin
            failures++; $display("FAIL n=%0d d=%0d s=%0d preg=%0d got %b exp %b", n, d, s, rd_preg[d][s], rd_busy[d][s], e);
          end
        end
      for (int d = 0; d < 2; d++) if (alloc_valid[d] && alloc_preg[d] != 0) after[alloc_preg[d]] = 1;
      model = after;
    end
    checks++;
    if (byp == 0 || grp == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ras: pushes and pops random return addresses and compares the top of
// stack with a reference stack model, including overflow of the 8 entries
// (oldest entries lost), underflow (empty stack) and push+pop replacement.
module tb_ras;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [VADDR_BITS-1:0] push_addr = '0, top;
  logic top_valid;
  int checks = 0, failures = 0;
  logic [VADDR_BITS-1:0] model [$];

  ras #(.DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (top_valid !== (model.size() != 0) || (model.size() != 0 && top !== model[$])) begin
        failures++;
        $display("FAIL n=%0d valid=%b top=%h exp_size=%0d", n, top_valid, top, model.size());
      end
      push = 1'($urandom); pop = 1'($urandom);
      if (n % 200 < 60) pop = 1'b0;        // phases that overflow
      else if (n % 200 < 120) push = 1'b0; // phases that underflow
      push_addr = {8'h00, $urandom};
      if (push && pop) begin
        if (model.size() != 0) void'(model.pop_back());
        model.push_back(push_addr);
      end else if (push) begin
        model.push_back(push_addr);
        if (model.size() > 8) void'(model.pop_front());
      end else if (pop && model.size() != 0) begin
        void'(model.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

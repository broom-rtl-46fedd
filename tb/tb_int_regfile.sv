// tb_int_regfile: random writes on all three ports and reads on all six
// ports against a reference array; checks the zero register, old-value
// reads in a write cycle, and every register of every cluster.
module tb_int_regfile;
  import broom_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PREG_BITS-1:0] raddr [6], waddr [3];
  logic [63:0] rdata [6], wdata [3];
  logic [2:0] we;
  logic [63:0] model [70];
  int checks = 0, failures = 0;

  int_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = '0;
    for (int i = 0; i < 6; i++) raddr[i] = '0;
    for (int i = 0; i < 3; i++) begin waddr[i] = '0; wdata[i] = '0; end
    for (int i = 0; i < 70; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill every register through rotating ports
    for (int r = 0; r < 70; r++) begin
      @(negedge clk);
      we = '0; we[r % 3] = 1'b1;
      waddr[r % 3] = PREG_BITS'(r);
      wdata[r % 3] = {$urandom, $urandom};
      if (r != 0) model[r] = wdata[r % 3];
    end
    @(negedge clk); we = '0;
    for (int n = 0; n < 3000; n++) begin
      int used [3];
      @(negedge clk);
      // reads see the state before this cycle's writes
      for (int p = 0; p < 6; p++) raddr[p] = PREG_BITS'($urandom_range(0, 69));
      for (int w = 0; w < 3; w++) begin
        used[w] = -1;
        we[w] = 1'($urandom);
        waddr[w] = PREG_BITS'($urandom_range(0, 69));
        for (int o = 0; o < w; o++) if (we[o] && waddr[o] == waddr[w]) we[w] = 1'b0;
        wdata[w] = {$urandom, $urandom};
      end
      #1;
      for (int p = 0; p < 6; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++; $display("FAIL port %0d reg %0d: %h vs %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      for (int w = 0; w < 3; w++) if (we[w] && waddr[w] != 0) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

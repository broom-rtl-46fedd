// tb_sram_sp: checks the SRAM macro model against a reference array:
// one-cycle read latency, output hold while idle, bit-masked writes and the
// stuck-at fault model.
module tb_sram_sp;
  localparam int D = 32, W = 16;
  logic clk = 0, en = 0, we = 0;
  logic [4:0] addr = '0;
  logic [W-1:0] wdata = '0, wmask = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  sram_sp #(.DEPTH(D), .WIDTH(W), .NFAULT(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic wr(input int a, input logic [W-1:0] d, input logic [W-1:0] m);
    @(negedge clk); en = 1; we = 1; addr = 5'(a); wdata = d; wmask = m;
    ref_mem[a] = (ref_mem[a] & ~m) | (d & m);
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic rd(input int a, input logic [W-1:0] exp);
    @(negedge clk); en = 1; we = 0; addr = 5'(a);
    @(negedge clk); en = 0;
    chk(rdata, exp, "read");
    @(negedge clk);
    chk(rdata, exp, "hold");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) wr(i, W'($urandom), '1);
    for (int i = 0; i < D; i++) rd(i, ref_mem[i]);
    for (int n = 0; n < 100; n++) begin
      int a = $urandom_range(0, D-1);
      wr(a, W'($urandom), W'($urandom));
      rd(a, ref_mem[a]);
    end
    // stuck-at faults
    dut.set_fault(0, 7, 3, 1'b1);
    dut.set_fault(1, 7, 9, 1'b0);
    wr(7, 16'h0200, '1);
    rd(7, 16'h0008);
    wr(7, 16'hffff, '1);
    rd(7, 16'hfdff);
    dut.clear_faults();
    rd(7, 16'hffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

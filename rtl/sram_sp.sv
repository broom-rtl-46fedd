// sram_sp: behavioural model of a single-ported SRAM macro as produced by a
// foundry memory compiler (the real part is a hard macro, not logic).
//
// One access per cycle: with en=1 and we=1 the bits selected by wmask are
// written at addr; with en=1 and we=0 the word at addr appears on rdata on
// the next cycle.  rdata holds its value while the macro is idle, like the
// output latch of a compiled SRAM.  Contents are not initialised.
//
// Low-voltage bit failures are modelled as up to NFAULT stuck-at cells.  A
// testbench places them with set_fault(); a faulty cell always reads its
// stuck value, whatever was written.  With no fault placed the model is an
// ideal memory.  The fault list is a simulation aid of this model only.
module sram_sp #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned NFAULT = 16,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW    = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [WIDTH-1:0] wmask,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  // stuck-at fault list (behavioural only)
  logic          f_valid [NFAULT];
  logic [AW-1:0] f_addr  [NFAULT];
  logic [BW-1:0] f_bit   [NFAULT];
  logic          f_val   [NFAULT];

  initial begin
    for (int i = 0; i < NFAULT; i++) begin
      f_valid[i] = 1'b0;
      f_addr[i]  = '0;
      f_bit[i]   = '0;
      f_val[i]   = 1'b0;
    end
  end

  task automatic set_fault(input int idx, input int a, input int b, input bit v);
    f_valid[idx] = 1'b1;
    f_addr[idx]  = AW'(a);
    f_bit[idx]   = BW'(b);
    f_val[idx]   = v;
  endtask

  task automatic clear_faults();
    for (int i = 0; i < NFAULT; i++) f_valid[i] = 1'b0;
  endtask

  function automatic logic [WIDTH-1:0] apply_faults(input logic [AW-1:0] a,
                                                    input logic [WIDTH-1:0] d);
    logic [WIDTH-1:0] r;
    r = d;
    for (int i = 0; i < NFAULT; i++)
      if (f_valid[i] && f_addr[i] == a) r[f_bit[i]] = f_val[i];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= (mem[addr] & ~wmask) | (wdata & wmask);
      else    rdata     <= apply_faults(addr, mem[addr]);
    end
  end

endmodule

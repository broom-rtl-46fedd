// broom_pkg: types and constants shared by the BROOM core slice and the
// resilient L2 cache.
//
// The machine is a 64-bit RISC-V out-of-order core (the integer register
// file holds 70 x 64 = 4480 bits).  Micro-ops (uops) carry physical register
// numbers after rename; the same uop struct travels through the three
// distributed issue windows (integer, memory, floating point).  Widths not
// fixed by the design description (virtual address, immediate, ROB index,
// operation code) are this implementation's choices.
package broom_pkg;

  localparam int unsigned XLEN       = 64;   // RV64: 70 regs x 64 b = 4480 bits
  localparam int unsigned VADDR_BITS = 40;   // assumed (Sv39 plus sign bit)
  localparam int unsigned INT_PREGS  = 70;   // integer physical registers
  localparam int unsigned FP_PREGS   = 64;   // assumed
  localparam int unsigned PREG_BITS  = 7;    // enough for 70 registers
  localparam int unsigned ROB_BITS   = 6;    // assumed ROB index width
  localparam int unsigned IMM_BITS   = 20;   // assumed immediate field

  // Which issue window a uop is steered to.
  typedef enum logic [1:0] {
    IQ_INT = 2'd0,
    IQ_MEM = 2'd1,
    IQ_FP  = 2'd2
  } iq_kind_e;

  // A renamed micro-op as it waits in an issue window.
  typedef struct packed {
    logic [ROB_BITS-1:0]  rob_idx;
    logic [4:0]           fu_op;    // operation for the functional unit
    logic [PREG_BITS-1:0] pdst;
    logic                 dst_en;
    logic [PREG_BITS-1:0] prs1;
    logic [PREG_BITS-1:0] prs2;
    logic [PREG_BITS-1:0] prs3;     // third operand (FP fused multiply-add)
    logic                 p1_busy;
    logic                 p2_busy;
    logic                 p3_busy;
    logic [IMM_BITS-1:0]  imm;
  } uop_t;

  // A writeback broadcast: clears busy bits and wakes waiting uops.
  typedef struct packed {
    logic                 valid;
    logic [PREG_BITS-1:0] pdst;
  } wakeup_t;

  // Branch kinds known to the branch target buffer.
  typedef enum logic [1:0] {
    BR_COND = 2'd0,
    BR_JUMP = 2'd1,
    BR_CALL = 2'd2,
    BR_RET  = 2'd3
  } br_kind_e;

endpackage

// bpd: conditional branch direction predictor with global history (gshare
// style).  It predicts only taken/not-taken; targets come from the BTB or
// from decode.
//
// Index = fetch address bits XOR the last HIST_BITS branch outcomes.  Each
// index selects a 2-bit counter split across two tables: a prediction table
// (counter MSB) and a hysteresis table (counter LSB).  The tall, skinny
// tables (ENTRIES x 1 bit) are folded into square single-ported SRAMs of
// ROWS x COLS bits: the upper index bits pick the row, the lower ones the
// column, and an update writes a single column through the bit mask.
//
// Timing (two stages, as in the redesigned frontend): the cycle a request
// arrives is spent entirely on the hash, whose result is registered; the
// next cycle reads the SRAMs in parallel with instruction decode; the
// prediction (resp_*) is available at the start of the cycle after that,
// two cycles after req_valid.  An update in the same cycle as the SRAM read
// takes the port and the prediction is dropped (resp_valid = 0).  The tables
// are set to weakly-not-taken after reset, one row per cycle.
// The global-history hashing, the split prediction/hysteresis tables, the
// square SRAM folding and the two-stage timing follow the description; the
// sizes are this design's choices.
module bpd
  import broom_pkg::*;
#(
  parameter int unsigned HIST_BITS = 12,
  localparam int unsigned ENTRIES  = 1 << HIST_BITS,
  localparam int unsigned COL_BITS = HIST_BITS / 2,
  localparam int unsigned ROW_BITS = HIST_BITS - COL_BITS,
  localparam int unsigned ROWS     = 1 << ROW_BITS,
  localparam int unsigned COLS     = 1 << COL_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  input  logic [VADDR_BITS-1:0] req_pc,
  input  logic [HIST_BITS-1:0]  req_ghist,
  output logic                  resp_valid,
  output logic                  resp_taken,
  output logic [1:0]            resp_ctr,
  output logic [HIST_BITS-1:0]  resp_idx,
  input  logic                  upd_valid,
  input  logic [HIST_BITS-1:0]  upd_idx,
  input  logic [1:0]            upd_ctr,
  input  logic                  upd_taken
);

  logic                 s1_valid_q, s2_valid_q;
  logic [HIST_BITS-1:0] s1_idx_q, s2_idx_q;
  logic                 init_q;
  logic [ROW_BITS-1:0]  init_row_q;
  logic [COLS-1:0]      pred_row, hyst_row;

  logic                 en, we;
  logic [ROW_BITS-1:0]  addr;
  logic [COLS-1:0]      mask, pred_wd, hyst_wd;
  logic [1:0]           new_ctr;

  always_comb begin
    if (upd_taken) new_ctr = (upd_ctr == 2'b11) ? 2'b11 : upd_ctr + 2'd1;
    else           new_ctr = (upd_ctr == 2'b00) ? 2'b00 : upd_ctr - 2'd1;
    if (init_q) begin
      en = 1'b1; we = 1'b1; addr = init_row_q; mask = '1;
      pred_wd = '0; hyst_wd = '1;
    end else if (upd_valid) begin
      en      = 1'b1; we = 1'b1;
      addr    = upd_idx[COL_BITS +: ROW_BITS];
      mask    = COLS'(1) << upd_idx[COL_BITS-1:0];
      pred_wd = {COLS{new_ctr[1]}};
      hyst_wd = {COLS{new_ctr[0]}};
    end else begin
      en = s1_valid_q; we = 1'b0; addr = s1_idx_q[COL_BITS +: ROW_BITS];
      mask = '0; pred_wd = '0; hyst_wd = '0;
    end
  end

  sram_sp #(.DEPTH(ROWS), .WIDTH(COLS)) u_pred (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(pred_wd), .wmask(mask), .rdata(pred_row));
  sram_sp #(.DEPTH(ROWS), .WIDTH(COLS)) u_hyst (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(hyst_wd), .wmask(mask), .rdata(hyst_row));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q <= 1'b0;
      s2_valid_q <= 1'b0;
      s1_idx_q   <= '0;
      s2_idx_q   <= '0;
      init_q     <= 1'b1;
      init_row_q <= '0;
    end else begin
      if (init_q) begin
        init_row_q <= init_row_q + 1'b1;
        if (init_row_q == ROW_BITS'(ROWS - 1)) init_q <= 1'b0;
      end
      // stage 0 -> 1: the full cycle goes to the hash
      s1_valid_q <= req_valid && !init_q;
      s1_idx_q   <= req_pc[2 +: HIST_BITS] ^ req_ghist;
      // stage 1 -> 2: SRAM read
      s2_valid_q <= s1_valid_q && !upd_valid && !init_q;
      s2_idx_q   <= s1_idx_q;
    end
  end

  assign resp_valid = s2_valid_q;
  assign resp_idx   = s2_idx_q;
  assign resp_ctr   = {pred_row[s2_idx_q[COL_BITS-1:0]], hyst_row[s2_idx_q[COL_BITS-1:0]]};
  assign resp_taken = s2_valid_q && resp_ctr[1];

endmodule

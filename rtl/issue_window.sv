// issue_window: one distributed issue window, a collapsing queue of renamed
// uops with oldest-first issue select.
//
// Slot 0 always holds the oldest uop.  Each cycle:
//   * wakeup: every writeback broadcast clears the matching busy bits of the
//     waiting uops (and of uops being dispatched in the same cycle);
//   * select: a cascading priority search picks, for each of the ISSUE
//     ports, the oldest uop whose operands are all ready;
//   * collapse: the issued slots are removed and the younger uops move up
//     toward slot 0, closing the gaps; newly dispatched uops are appended
//     behind the youngest survivor.
// A uop woken in cycle t can be selected in cycle t+1.  Issued uops leave on
// iss_valid/iss_uop in the cycle they are selected (the register-read stage
// that follows registers them).  disp_ready says whether DISP free slots
// remain; dispatching while it is low is a protocol error (asserted).
// The collapsing queue, oldest-first select and the 16-entry windows with
// two issue ports on the integer window follow the design description; the
// dispatch width and wakeup timing are this design's choices.
module issue_window
  import broom_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned ISSUE   = 1,
  parameter int unsigned DISP    = 2,
  parameter int unsigned NWB     = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [DISP-1:0] disp_valid,
  input  uop_t            disp_uop [DISP],
  output logic            disp_ready,
  input  wakeup_t         wb [NWB],
  output logic [ISSUE-1:0] iss_valid,
  output uop_t            iss_uop [ISSUE],
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  localparam int unsigned CW = $clog2(ENTRIES + 1);

  logic [ENTRIES-1:0] valid_q;
  uop_t               slot_q [ENTRIES];

  function automatic uop_t wake(input uop_t u, input wakeup_t w [NWB]);
    uop_t r;
    r = u;
    for (int k = 0; k < NWB; k++) begin
      if (w[k].valid && w[k].pdst == u.prs1) r.p1_busy = 1'b0;
      if (w[k].valid && w[k].pdst == u.prs2) r.p2_busy = 1'b0;
      if (w[k].valid && w[k].pdst == u.prs3) r.p3_busy = 1'b0;
    end
    return r;
  endfunction

  // ---- select: oldest ready first ----
  logic [ENTRIES-1:0] ready, issued;
  always_comb begin
    int n;
    n = 0;
    issued = '0;
    for (int p = 0; p < ISSUE; p++) begin
      iss_valid[p] = 1'b0;
      iss_uop[p]   = '0;
    end
    for (int i = 0; i < ENTRIES; i++) begin
      ready[i] = valid_q[i] && !slot_q[i].p1_busy && !slot_q[i].p2_busy && !slot_q[i].p3_busy;
      if (ready[i] && n < ISSUE) begin
        issued[i]    = 1'b1;
        iss_valid[n] = 1'b1;
        iss_uop[n]   = slot_q[i];
        n++;
      end
    end
  end

  // ---- collapse and append ----
  logic [ENTRIES-1:0] nvalid;
  uop_t               nslot [ENTRIES];
  logic [CW-1:0]      count;
  always_comb begin
    int n;
    n = 0;
    count = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      nvalid[i] = 1'b0;
      nslot[i]  = '0;
      if (valid_q[i]) count++;
    end
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && !issued[i]) begin
        nvalid[n] = 1'b1;
        nslot[n]  = wake(slot_q[i], wb);
        n++;
      end
    end
    for (int d = 0; d < DISP; d++) begin
      if (disp_valid[d] && n < ENTRIES) begin
        nvalid[n] = 1'b1;
        nslot[n]  = wake(disp_uop[d], wb);
        n++;
      end
    end
  end

  assign occupancy  = count;
  assign disp_ready = (int'(count) + DISP <= ENTRIES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) slot_q[i] <= '0;
    end else begin
      valid_q <= nvalid;
      for (int i = 0; i < ENTRIES; i++) slot_q[i] <= nslot[i];
    end
  end

  // dispatch must respect disp_ready
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (|disp_valid) |-> disp_ready);

endmodule

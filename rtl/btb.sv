// btb: partially tagged, set-associative branch target buffer held in
// single-ported SRAM macros (one macro per way).
//
// Each entry holds a valid bit, a partial tag of the fetch address, the full
// branch target, the branch kind and a 2-bit hysteresis counter that decides
// taken/not-taken on a tag hit (jumps, calls and returns are always taken).
// Lookup: present req_pc with req_valid; resp_* is valid on the next cycle
// (synchronous SRAM read).  Because the macros have one port, an update in
// the same cycle wins and the lookup is dropped (resp_valid stays 0).
// Update: the branch unit returns the way and old counter that the lookup
// reported, so no read-modify-write is needed.  A hit updates the counter
// and target; a taken miss allocates a way chosen round-robin with the
// counter set to weakly taken; a not-taken miss writes nothing.
// The partial tag, set-associative organisation, SRAM storage, hysteresis
// bits and entry contents follow the design description; sizes, the
// replacement policy and the update protocol are this design's choices.
module btb
  import broom_pkg::*;
#(
  parameter int unsigned SETS     = 128,
  parameter int unsigned WAYS     = 2,
  parameter int unsigned TAG_BITS = 12,
  localparam int unsigned IDX_BITS = $clog2(SETS),
  localparam int unsigned WAY_BITS = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // lookup
  input  logic                  req_valid,
  input  logic [VADDR_BITS-1:0] req_pc,
  output logic                  resp_valid,   // lookup performed
  output logic                  resp_hit,
  output logic                  resp_taken,
  output logic [VADDR_BITS-1:0] resp_target,
  output br_kind_e              resp_kind,
  output logic [WAY_BITS-1:0]   resp_way,
  output logic [1:0]            resp_ctr,
  // update from branch resolution
  input  logic                  upd_valid,
  input  logic [VADDR_BITS-1:0] upd_pc,
  input  logic [VADDR_BITS-1:0] upd_target,
  input  br_kind_e              upd_kind,
  input  logic                  upd_taken,
  input  logic                  upd_was_hit,
  input  logic [WAY_BITS-1:0]   upd_way,
  input  logic [1:0]            upd_ctr
);

  typedef struct packed {
    logic                  valid;
    logic [TAG_BITS-1:0]   tag;
    logic [VADDR_BITS-1:0] target;
    br_kind_e              kind;
    logic [1:0]            ctr;
  } entry_t;
  localparam int unsigned EW = $bits(entry_t);

  function automatic logic [IDX_BITS-1:0] idx_of(input logic [VADDR_BITS-1:0] pc);
    return pc[2 +: IDX_BITS];
  endfunction
  function automatic logic [TAG_BITS-1:0] tag_of(input logic [VADDR_BITS-1:0] pc);
    return pc[2+IDX_BITS +: TAG_BITS];
  endfunction

  logic                  rd_q;
  logic [TAG_BITS-1:0]   rtag_q;
  logic [WAY_BITS-1:0]   rr_q;
  entry_t                rd_e  [WAYS];
  logic [EW-1:0]         rdat  [WAYS];
  entry_t                wr_e;
  logic [WAY_BITS-1:0]   wr_way;
  logic                  wr_en;
  logic                  sram_rst_q;
  logic [IDX_BITS-1:0]   clr_idx_q;

  // write entry for an update
  always_comb begin
    wr_e        = '0;
    wr_e.valid  = 1'b1;
    wr_e.tag    = tag_of(upd_pc);
    wr_e.target = upd_target;
    wr_e.kind   = upd_kind;
    wr_en       = 1'b0;
    wr_way      = upd_way;
    if (upd_was_hit) begin
      wr_en = upd_valid;
      if (upd_taken) wr_e.ctr = (upd_ctr == 2'b11) ? 2'b11 : upd_ctr + 2'd1;
      else           wr_e.ctr = (upd_ctr == 2'b00) ? 2'b00 : upd_ctr - 2'd1;
    end else begin
      wr_en    = upd_valid && upd_taken;
      wr_way   = rr_q;
      wr_e.ctr = 2'b10;
    end
  end

  // After reset the entries are invalidated one set per cycle.
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic          en, we;
    logic [IDX_BITS-1:0] a;
    logic [EW-1:0] wd;
    always_comb begin
      if (sram_rst_q) begin
        en = 1'b1; we = 1'b1; a = clr_idx_q; wd = '0;
      end else begin
        en = (wr_en && wr_way == WAY_BITS'(w)) || (req_valid && !wr_en);
        we = wr_en;
        a  = wr_en ? idx_of(upd_pc) : idx_of(req_pc);
        wd = wr_e;
      end
    end
    sram_sp #(.DEPTH(SETS), .WIDTH(EW)) u_sram (
      .clk(clk), .en(en), .we(we), .addr(a), .wdata(wd), .wmask('1), .rdata(rdat[w]));
    assign rd_e[w] = entry_t'(rdat[w]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q       <= 1'b0;
      rtag_q     <= '0;
      rr_q       <= '0;
      sram_rst_q <= 1'b1;
      clr_idx_q  <= '0;
    end else begin
      if (sram_rst_q) begin
        clr_idx_q <= clr_idx_q + 1'b1;
        if (clr_idx_q == IDX_BITS'(SETS - 1)) sram_rst_q <= 1'b0;
      end
      rd_q   <= req_valid && !wr_en && !sram_rst_q;
      rtag_q <= tag_of(req_pc);
      if (wr_en && !upd_was_hit && !sram_rst_q)
        rr_q <= (rr_q == WAY_BITS'(WAYS - 1)) ? '0 : rr_q + 1'b1;
    end
  end

  // tag compare on the SRAM output
  always_comb begin
    resp_valid  = rd_q;
    resp_hit    = 1'b0;
    resp_way    = '0;
    resp_target = '0;
    resp_kind   = BR_COND;
    resp_ctr    = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (rd_e[w].valid && rd_e[w].tag == rtag_q) begin
        resp_hit    = rd_q;
        resp_way    = WAY_BITS'(w);
        resp_target = rd_e[w].target;
        resp_kind   = rd_e[w].kind;
        resp_ctr    = rd_e[w].ctr;
      end
    end
    resp_taken = resp_hit && (resp_kind != BR_COND || resp_ctr[1]);
  end

endmodule

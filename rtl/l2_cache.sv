// l2_cache: 1 MiB set-associative write-back L2 cache whose SRAM arrays
// tolerate the bit failures that appear at low supply voltage.
//
// Organisation: WAYS ways of SETS sets, 64-byte lines stored as BEATS rows of
// 64 bits.  Every way has three single-ported SRAM macros: a tag array
// ({valid, dirty, tag}), a data array with one spare column per row, and a
// fault-map array holding the repair state of each line.
//
// Resilience, configured by a built-in self-test (BIST) run after the
// supply voltage is set (bist_start):
//   BIST   every row of every tag and data array is written with all-0 and
//          all-1 and read back; mismatching bits are faulty columns.
//   DCR    dynamic column redundancy: a line whose data rows fail in a single
//          column gets a redundancy address; the dcr shifter steers data
//          around that column into the spare one.
//   BB-S   bit bypass with SRAM: a tag entry with one faulty bit keeps the
//          bit's position and its correct value in the fault-map SRAM; the
//          value is rewritten on every tag write and patched into every tag
//          read.
//   LD     line disable: a line with more faults than DCR and BB-S repair is
//          never allocated.  A set with no usable way is served uncached.
//   LR     line recycling: three disabled lines of one set whose faulty bits
//          are all in different places are joined into one line.  Writes go
//          to all three, reads take the bitwise majority, so each bit is
//          right in at least two copies.  The group's tag lives in the entry
//          of its lowest way, which must itself be repairable.
// With assist_en=0 the BIST only clears the tags and records no repairs
// (the unassisted cache).  The counters log_* report what the last BIST
// did (lines disabled, DCR and BB-S repairs, recycled groups).
//
// Client port: one request at a time (req_valid/req_ready), 64-bit words
// with a byte mask.  A hit answers on resp_valid in the cycle after the
// request is accepted (tag, fault-map and data SRAMs read in the accept
// cycle, compare and repair in the next).  Writes are acknowledged the same
// way.  A miss writes back
// a dirty victim and refills the line word by word over the memory port
// (mem_req_valid/ready; read data returns in order on mem_resp_valid), then
// replays the access.  req_ready is low until the first BIST has finished.
// The four assist techniques, the boot-time BIST and the 1 MiB size follow
// the design description; the associativity, line size, fault-map format,
// the set-local recycling groups and the controller are this design's own.
module l2_cache
  import broom_pkg::*;
#(
  parameter int unsigned WAYS  = 8,
  parameter int unsigned SETS  = 2048,
  parameter int unsigned BEATS = 8,
  parameter int unsigned PADDR = 32,
  localparam int unsigned SB   = $clog2(SETS),
  localparam int unsigned BB   = $clog2(BEATS),
  localparam int unsigned WB   = $clog2(WAYS),
  localparam int unsigned TAGB = PADDR - SB - BB - 3,
  localparam int unsigned TW   = TAGB + 2,
  localparam int unsigned TPB  = $clog2(TW),
  localparam int unsigned RW   = 65
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_start,
  input  logic             assist_en,
  output logic             bist_busy,
  output logic             bist_done,
  // client (core side)
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  logic [PADDR-1:0] req_addr,
  input  logic [63:0]      req_wdata,
  input  logic [7:0]       req_wmask,
  output logic             resp_valid,
  output logic [63:0]      resp_rdata,
  // outer memory
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_we,
  output logic [PADDR-1:0] mem_req_addr,
  output logic [63:0]      mem_req_wdata,
  output logic [7:0]       mem_req_wmask,
  input  logic             mem_resp_valid,
  input  logic [63:0]      mem_resp_rdata,
  // error log of the last BIST and access events
  output logic [15:0]      log_ld,
  output logic [15:0]      log_dcr,
  output logic [15:0]      log_bbs,
  output logic [15:0]      log_lr,
  output logic             ev_hit,
  output logic             ev_miss,
  output logic             ev_writeback,
  output logic             ev_uncached,
  output logic             ev_recycled_access
);

  typedef struct packed {
    logic            valid;
    logic            dirty;
    logic [TAGB-1:0] tag;
  } tag_t;

  typedef struct packed {
    logic           bbs_v;
    logic [TPB-1:0] bbs_pos;
    logic           bbs_val;
    logic           ld;
    logic           dcr_v;
    logic [5:0]     dcr_pos;
    logic           lr;
  } meta_t;
  localparam int unsigned MW = $bits(meta_t);

  typedef enum logic [3:0] {
    S_WAIT_BIST, S_B_OP, S_B_DRAIN, S_B_DECIDE, S_IDLE, S_LOOK, S_WB_RD, S_WB_SEND,
    S_RF_REQ, S_RF_WAIT, S_RF_TAG, S_REPLAY, S_BYP, S_BYP_WAIT
  } state_e;

  state_e state_q;

  // ---------------- SRAM arrays ----------------
  logic              t_en, t_we, m_en, m_we, d_en;
  logic [WAYS-1:0]   t_wsel, m_wsel, d_we;
  logic [SB-1:0]     t_addr;
  logic [SB+BB-1:0]  d_addr;
  logic [TW-1:0]     t_wd [WAYS];
  logic [MW-1:0]     m_wd [WAYS];
  logic [RW-1:0]     d_wd [WAYS];
  logic [TW-1:0]     t_rd [WAYS];
  logic [MW-1:0]     m_rd [WAYS];
  logic [RW-1:0]     d_rd [WAYS];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    sram_sp #(.DEPTH(SETS), .WIDTH(TW)) u_tag (
      .clk, .en(t_en && (!t_we || t_wsel[w])), .we(t_we), .addr(t_addr),
      .wdata(t_wd[w]), .wmask('1), .rdata(t_rd[w]));
    sram_sp #(.DEPTH(SETS), .WIDTH(MW)) u_meta (
      .clk, .en(m_en && (!m_we || m_wsel[w])), .we(m_we), .addr(t_addr),
      .wdata(m_wd[w]), .wmask('1), .rdata(m_rd[w]));
    sram_sp #(.DEPTH(SETS*BEATS), .WIDTH(RW)) u_data (
      .clk, .en(d_en || d_we[w]), .we(d_we[w]), .addr(d_addr),
      .wdata(d_wd[w]), .wmask('1), .rdata(d_rd[w]));
  end

  // ---------------- request registers ----------------
  logic             we_q;
  logic [PADDR-1:0] addr_q;
  logic [63:0]      wdata_q;
  logic [7:0]       wmask_q;
  logic [SB-1:0]    set_q;
  logic [TAGB-1:0]  tag_q;
  logic [BB-1:0]    beat_q;      // beat of the request
  logic [BB-1:0]    cnt_q;       // beat counter for write-back / refill / BIST
  logic [WB-1:0]    vic_q, rr_q;
  tag_t             vtag_q;
  meta_t            meta_q [WAYS];
  logic             first_bist_q;

  assign set_q  = addr_q[3+BB +: SB];
  assign tag_q  = addr_q[3+BB+SB +: TAGB];
  assign beat_q = addr_q[3 +: BB];

  // ---------------- read path: BB-S, DCR, LR ----------------
  meta_t            m [WAYS];
  tag_t             tfix [WAYS];
  logic [63:0]      word [WAYS];
  logic [WAYS-1:0]  usable, hit;
  logic [WB-1:0]    lr_idx [3];
  logic [1:0]       lr_n;
  logic [63:0]      lr_word;

  // fault map in use: straight from the SRAM during lookup, latched after
  meta_t mcur [WAYS];
  always_comb
    for (int w = 0; w < WAYS; w++) mcur[w] = (state_q == S_LOOK) ? m[w] : meta_q[w];

  for (genvar w = 0; w < WAYS; w++) begin : g_rd
    logic [TW-1:0] tf;
    assign m[w] = meta_t'(m_rd[w]);
    always_comb begin
      tf = t_rd[w];
      if (m[w].bbs_v) tf[m[w].bbs_pos] = m[w].bbs_val;     // bit bypass
    end
    assign tfix[w] = tag_t'(tf);
    dcr #(.WIDTH(64)) u_dcr_rd (
      .ra_valid(mcur[w].dcr_v), .ra_pos(mcur[w].dcr_pos), .wdata('0), .wrow(),
      .rrow(d_rd[w]), .rdata(word[w]));
  end

  // recycled group members
  always_comb begin
    lr_n = '0;
    for (int k = 0; k < 3; k++) lr_idx[k] = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (mcur[w].lr && lr_n != 2'd3) begin
        lr_idx[lr_n] = WB'(w);
        lr_n++;
      end
    end
  end

  lr_vote #(.WIDTH(64)) u_vote (
    .a(d_rd[lr_idx[0]][63:0]), .b(d_rd[lr_idx[1]][63:0]), .c(d_rd[lr_idx[2]][63:0]),
    .y(lr_word));

  function automatic logic [63:0] way_word(input logic [WB-1:0] w);
    if (mcur[w].lr) return lr_word;
    return word[w];
  endfunction

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      usable[w] = !mcur[w].ld || (mcur[w].lr && lr_n == 2'd3 && lr_idx[0] == WB'(w));
      hit[w]    = usable[w] && tfix[w].valid && tfix[w].tag == tag_q;
    end
  end

  logic          any_hit, any_usable, found_inv;
  logic [WB-1:0] hit_way, vic_way;
  always_comb begin
    any_hit = 1'b0; hit_way = '0; any_usable = |usable;
    for (int w = WAYS - 1; w >= 0; w--) if (hit[w]) begin any_hit = 1'b1; hit_way = WB'(w); end
    // victim: an invalid usable way, else the next usable way from rr_q
    found_inv = 1'b0; vic_way = '0;
    for (int k = WAYS - 1; k >= 0; k--) begin
      if (usable[WB'(rr_q + WB'(k))]) vic_way = WB'(rr_q + WB'(k));
    end
    for (int w = WAYS - 1; w >= 0; w--)
      if (usable[w] && !tfix[w].valid) begin found_inv = 1'b1; vic_way = WB'(w); end
  end

  logic [63:0] hit_word, merged, vic_word;
  always_comb begin
    hit_word = way_word(hit_way);
    vic_word = way_word(vic_q);
    for (int b = 0; b < 8; b++)
      merged[8*b +: 8] = wmask_q[b] ? wdata_q[8*b +: 8] : hit_word[8*b +: 8];
  end

  // data row to write into way w when the logical line lives in way `lw`
  logic [RW-1:0] enc_row [WAYS];
  logic [63:0]   enc_in;
  for (genvar w = 0; w < WAYS; w++) begin : g_enc
    dcr #(.WIDTH(64)) u_dcr_wr (
      .ra_valid(mcur[w].dcr_v && !mcur[w].lr), .ra_pos(mcur[w].dcr_pos), .wdata(enc_in),
      .wrow(enc_row[w]), .rrow('0), .rdata());
  end

  function automatic logic [WAYS-1:0] members(input logic [WB-1:0] lw);
    logic [WAYS-1:0] r;
    r = '0;
    if (mcur[lw].lr) for (int k = 0; k < 3; k++) r[lr_idx[k]] = 1'b1;
    else               r[lw] = 1'b1;
    return r;
  endfunction

  function automatic meta_t with_bbs(input meta_t mm, input tag_t t);
    meta_t r;
    logic [TW-1:0] tv;
    r  = mm;
    tv = t;
    r.bbs_val = tv[mm.bbs_pos];
    return r;
  endfunction

  // ---------------- BIST ----------------
  logic [1:0]        bop_q;                 // 0: W0, 1: R0, 2: W1, 3: R1
  logic              chk_q, chk_pat_q, chk_tag_q;
  logic [BB-1:0]     chk_beat_q;
  logic [SB-1:0]     bset_q;
  logic [TW-1:0]     tagf_q  [WAYS];
  logic [RW-1:0]     colf_q  [WAYS];        // faulty columns of the line
  logic [BEATS*64-1:0] bitf_q [WAYS];       // faulty data bits of the line, per beat
  meta_t             dec [WAYS];
  logic [WAYS-1:0]   dec_tag_ok;
  logic [4:0]        n_ld, n_dcr, n_bbs;
  logic              n_lr;

  function automatic int popc(input logic [RW-1:0] v);
    int c;
    c = 0;
    for (int i = 0; i < RW; i++) c += int'(v[i]);
    return c;
  endfunction

  always_comb begin
    n_ld = '0; n_dcr = '0; n_bbs = '0; n_lr = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      int nt, nd;
      dec[w] = '0;
      nt = popc(RW'(tagf_q[w]));
      nd = popc({1'b0, colf_q[w][63:0]});
      dec_tag_ok[w] = (nt <= 1);
      if (assist_en) begin
        for (int i = 0; i < TW; i++) if (tagf_q[w][i]) dec[w].bbs_pos = TPB'(i);
        for (int i = 0; i < 64; i++) if (colf_q[w][i]) dec[w].dcr_pos = 6'(i);
        dec[w].bbs_v = (nt == 1);
        dec[w].dcr_v = (nd == 1);
        dec[w].ld    = !(nt <= 1 && (nd == 0 || (nd == 1 && !colf_q[w][64])));
        if (dec[w].ld) begin dec[w].bbs_v = 1'b0; dec[w].dcr_v = 1'b0; end
        if (dec[w].ld && nt <= 1) dec[w].bbs_v = (nt == 1);   // kept for recycling
        n_ld  += 5'(dec[w].ld);
        n_dcr += 5'(dec[w].dcr_v);
        n_bbs += 5'(dec[w].bbs_v && !dec[w].ld);
      end
    end
    // line recycling: first triple of disabled lines with disjoint faults
    if (assist_en) begin
      for (int a = 0; a < WAYS; a++)
        for (int b = a + 1; b < WAYS; b++)
          for (int c = b + 1; c < WAYS; c++)
            if (!n_lr && dec[a].ld && dec[b].ld && dec[c].ld && dec_tag_ok[a] &&
                ((bitf_q[a] & bitf_q[b]) | (bitf_q[a] & bitf_q[c]) | (bitf_q[b] & bitf_q[c])) == '0) begin
              n_lr = 1'b1;
              dec[a].lr = 1'b1; dec[b].lr = 1'b1; dec[c].lr = 1'b1;
            end
    end
  end

  // ---------------- SRAM control ----------------
  tag_t nt_hit, nt_fill;
  assign nt_hit  = '{valid: 1'b1, dirty: 1'b1, tag: tag_q};
  assign nt_fill = '{valid: 1'b1, dirty: 1'b0, tag: tag_q};

  always_comb begin
    t_en = 1'b0; t_we = 1'b0; t_wsel = '0; t_addr = set_q;
    m_en = 1'b0; m_we = 1'b0; m_wsel = '0;
    d_en = 1'b0; d_we = '0; d_addr = {set_q, beat_q};
    enc_in = merged;
    for (int w = 0; w < WAYS; w++) begin
      t_wd[w] = '0; m_wd[w] = '0; d_wd[w] = enc_row[w];
    end
    unique case (state_q)
      S_B_OP: begin
        t_addr = bset_q;
        d_addr = {bset_q, cnt_q};
        t_en   = (cnt_q == '0);
        t_we   = !bop_q[0];
        t_wsel = '1;
        d_en   = bop_q[0];
        d_we   = bop_q[0] ? '0 : '1;
        for (int w = 0; w < WAYS; w++) begin
          t_wd[w] = {TW{bop_q[1]}};
          d_wd[w] = {RW{bop_q[1]}};
        end
      end
      S_B_DECIDE: begin
        t_addr = bset_q;
        t_en = 1'b1; t_we = 1'b1; t_wsel = '1;
        m_en = 1'b1; m_we = 1'b1; m_wsel = '1;
        for (int w = 0; w < WAYS; w++) m_wd[w] = dec[w];
      end
      S_IDLE: begin
        t_addr = req_addr[3+BB +: SB];
        d_addr = req_addr[3 +: SB+BB];
        t_en = req_valid; m_en = req_valid; d_en = req_valid;
      end
      S_REPLAY: begin
        t_en = 1'b1; m_en = 1'b1; d_en = 1'b1;
      end
      S_LOOK: begin
        if (any_hit && we_q) begin
          d_we = members(hit_way);
          for (int w = 0; w < WAYS; w++) if (mcur[w].lr) d_wd[w] = {1'b0, merged};
          t_en = 1'b1; t_we = 1'b1; t_wsel[hit_way] = 1'b1; t_wd[hit_way] = nt_hit;
          m_en = 1'b1; m_we = 1'b1; m_wsel[hit_way] = 1'b1;
          m_wd[hit_way] = with_bbs(mcur[hit_way], nt_hit);
        end
      end
      S_WB_RD: begin
        d_addr = {set_q, cnt_q};
        d_en   = 1'b1;
      end
      S_RF_WAIT: begin
        d_addr = {set_q, cnt_q};
        enc_in = mem_resp_rdata;
        if (mem_resp_valid) d_we = members(vic_q);
        for (int w = 0; w < WAYS; w++) if (mcur[w].lr) d_wd[w] = {1'b0, mem_resp_rdata};
      end
      S_RF_TAG: begin
        t_en = 1'b1; t_we = 1'b1; t_wsel[vic_q] = 1'b1; t_wd[vic_q] = nt_fill;
        m_en = 1'b1; m_we = 1'b1; m_wsel[vic_q] = 1'b1;
        m_wd[vic_q] = with_bbs(mcur[vic_q], nt_fill);
      end
      default: ;
    endcase
  end

  // ---------------- outputs ----------------
  always_comb begin
    req_ready     = (state_q == S_IDLE);
    resp_valid    = 1'b0;
    resp_rdata    = '0;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = '0;
    mem_req_wmask = '1;
    ev_hit = 1'b0; ev_miss = 1'b0; ev_writeback = 1'b0; ev_uncached = 1'b0;
    ev_recycled_access = 1'b0;
    unique case (state_q)
      S_LOOK: begin
        if (any_hit) begin
          resp_valid = 1'b1;
          resp_rdata = hit_word;
          ev_hit     = 1'b1;
          ev_recycled_access = mcur[hit_way].lr;
        end else begin
          ev_miss     = any_usable;
          ev_uncached = !any_usable;
          ev_writeback = any_usable && tfix[vic_way].valid && tfix[vic_way].dirty;
        end
      end
      S_WB_SEND: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {vtag_q.tag, set_q, cnt_q, 3'b000};
        mem_req_wdata = vic_word;
      end
      S_RF_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = {tag_q, set_q, cnt_q, 3'b000};
      end
      S_BYP: begin
        mem_req_valid = 1'b1;
        mem_req_we    = we_q;
        mem_req_addr  = {addr_q[PADDR-1:3], 3'b000};
        mem_req_wdata = wdata_q;
        mem_req_wmask = wmask_q;
        resp_valid    = we_q && mem_req_ready;
      end
      S_BYP_WAIT: begin
        resp_valid = mem_resp_valid;
        resp_rdata = mem_resp_rdata;
      end
      default: ;
    endcase
  end

  assign bist_busy = (state_q == S_B_OP) || (state_q == S_B_DRAIN) || (state_q == S_B_DECIDE);
  assign bist_done = !first_bist_q && !bist_busy;

  // ---------------- state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_WAIT_BIST;
      first_bist_q <= 1'b1;
      we_q <= 1'b0; addr_q <= '0; wdata_q <= '0; wmask_q <= '0;
      cnt_q <= '0; vic_q <= '0; rr_q <= '0; vtag_q <= '0;
      bop_q <= '0; chk_q <= 1'b0; chk_pat_q <= 1'b0; chk_tag_q <= 1'b0; chk_beat_q <= '0;
      bset_q <= '0;
      log_ld <= '0; log_dcr <= '0; log_bbs <= '0; log_lr <= '0;
      for (int w = 0; w < WAYS; w++) begin
        meta_q[w] <= '0; tagf_q[w] <= '0; colf_q[w] <= '0; bitf_q[w] <= '0;
      end
    end else begin
      // BIST read-back check, one cycle after each BIST read
      chk_q <= (state_q == S_B_OP) && bop_q[0];
      chk_pat_q  <= bop_q[1];
      chk_tag_q  <= (cnt_q == '0);
      chk_beat_q <= cnt_q;
      if (chk_q) begin
        for (int w = 0; w < WAYS; w++) begin
          logic [RW-1:0] diff;
          diff = d_rd[w] ^ {RW{chk_pat_q}};
          colf_q[w] <= colf_q[w] | diff;
          bitf_q[w][64*chk_beat_q +: 64] <= bitf_q[w][64*chk_beat_q +: 64] | diff[63:0];
          if (chk_tag_q) tagf_q[w] <= tagf_q[w] | (t_rd[w] ^ {TW{chk_pat_q}});
        end
      end

      if (bist_start && (state_q == S_WAIT_BIST || state_q == S_IDLE)) begin
        state_q <= S_B_OP;
        bset_q <= '0; cnt_q <= '0; bop_q <= '0;
        log_ld <= '0; log_dcr <= '0; log_bbs <= '0; log_lr <= '0;
      end else begin
        unique case (state_q)
          S_WAIT_BIST: ;
          S_B_OP: begin
            bop_q <= bop_q + 2'd1;
            if (bop_q == 2'd3) begin
              cnt_q <= cnt_q + 1'b1;
              if (cnt_q == BB'(BEATS - 1)) state_q <= S_B_DRAIN;
            end
          end
          S_B_DRAIN: state_q <= S_B_DECIDE;
          S_B_DECIDE: begin
            log_ld  <= log_ld  + 16'(n_ld);
            log_dcr <= log_dcr + 16'(n_dcr);
            log_bbs <= log_bbs + 16'(n_bbs);
            log_lr  <= log_lr  + 16'(n_lr);
            for (int w = 0; w < WAYS; w++) begin
              tagf_q[w] <= '0; colf_q[w] <= '0; bitf_q[w] <= '0;
            end
            bset_q <= bset_q + 1'b1;
            cnt_q  <= '0;
            bop_q  <= '0;
            if (bset_q == SB'(SETS - 1)) begin
              state_q <= S_IDLE;
              first_bist_q <= 1'b0;
            end else begin
              state_q <= S_B_OP;
            end
          end
          S_IDLE: begin
            if (req_valid) begin
              we_q <= req_we; addr_q <= req_addr; wdata_q <= req_wdata; wmask_q <= req_wmask;
              state_q <= S_LOOK;
            end
          end
          S_REPLAY: state_q <= S_LOOK;
          S_LOOK: begin
            for (int w = 0; w < WAYS; w++) meta_q[w] <= m[w];
            if (any_hit) begin
              state_q <= S_IDLE;
            end else if (!any_usable) begin
              state_q <= S_BYP;
            end else begin
              vic_q  <= vic_way;
              vtag_q <= tfix[vic_way];
              cnt_q  <= '0;
              if (!found_inv) rr_q <= vic_way + 1'b1;
              state_q <= (tfix[vic_way].valid && tfix[vic_way].dirty) ? S_WB_RD : S_RF_REQ;
            end
          end
          S_WB_RD: state_q <= S_WB_SEND;
          S_WB_SEND: if (mem_req_ready) begin
            cnt_q <= cnt_q + 1'b1;
            state_q <= (cnt_q == BB'(BEATS - 1)) ? S_RF_REQ : S_WB_RD;
          end
          S_RF_REQ: if (mem_req_ready) state_q <= S_RF_WAIT;
          S_RF_WAIT: if (mem_resp_valid) begin
            cnt_q <= cnt_q + 1'b1;
            state_q <= (cnt_q == BB'(BEATS - 1)) ? S_RF_TAG : S_RF_REQ;
          end
          S_RF_TAG: state_q <= S_REPLAY;
          S_BYP: if (mem_req_ready) state_q <= we_q ? S_IDLE : S_BYP_WAIT;
          S_BYP_WAIT: if (mem_resp_valid) state_q <= S_IDLE;
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule

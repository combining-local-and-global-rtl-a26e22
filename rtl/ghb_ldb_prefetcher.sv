// GHB-LDB data prefetcher for an L1 data cache (highest-performance design
// point, "GHB-LDB-v1").
//
// The prefetcher sees the L1 access stream with the PC of each load/store and
// acts on triggers: demand misses and first hits on lines it prefetched. Every
// trigger PC is looked up in the index table, whose entry says where that PC's
// history lives:
//   * in the GHB, a global FIFO of trigger addresses threaded into one linked
//     list per PC. The list is walked, one entry per cycle, to rebuild the
//     PC's last 8 addresses (7 deltas). The first two entries found also give
//     the global deltas to their global successors for global-stride detection.
//     The current address is then pushed on the GHB as the PC's new list head.
//     A PC whose list is found full-length is hot: it is moved to a local
//     delta buffer, so that its later triggers need no walk;
//   * in a local delta buffer (LDB), which already holds the last deltas, the
//     last address, the last matched stride and a confidence bit.
// The prefetch function turns the deltas into up to 4 candidate addresses.
// Each candidate is checked against the prefetch MSHR, which drops lines
// already prefetched, and the rest leave on the pf_* port one per accepted
// handshake. Unknown PCs get an index-table entry and a next-line prefetch.
// The blocks, the shared index field and the filtering follow the original design; the
// sequencing below, the trigger rule and the promotion rule (a list of the
// full LDB length) are this implementation's own reading.
//
// Interface and timing:
//   acc_*  - one access per acc_valid & acc_ready. acc_ready is high only when
//            idle. Accesses that are neither misses nor prefetched hits are
//            accepted and ignored.
//   pf_*   - valid/ready. pf_addr holds while pf_valid waits for pf_ready.
//   fill_* - a prefetched line has arrived; the prefetch MSHR forgets it, so
//            it may be prefetched again after it leaves the cache. Tie
//            fill_valid low to keep every issued line until it is replaced.
//   events - one-cycle pulses for performance counting.
// Timing: the state after the edge that accepts a trigger is the index-table
// lookup. The first candidate is presented (or dropped by the MSHR filter) 2
// clock cycles after that edge on the LDB path, 3 + k cycles after it on the
// GHB path with a list walk of k entries (1 <= k <= 7), and 3 cycles after it
// for an unknown PC. Each further candidate takes one cycle (more while
// pf_ready is low); acc_ready returns the cycle after the last candidate.
module ghb_ldb_prefetcher
  import pf_pkg::*;
#(
  parameter int unsigned GHB_ENTRIES  = GHB_N,
  parameter int unsigned LDBS         = N_LDB,
  parameter int unsigned IT_SIZE      = IT_ENTRIES,
  parameter int unsigned IT_ASSOC     = IT_WAYS,
  parameter int unsigned MSHR_SIZE    = MSHR_ENTRIES,
  parameter int unsigned MSHR_ASSOC   = MSHR_WAYS,
  parameter int unsigned DEGREE       = PF_DEGREE
) (
  input  logic       clk,
  input  logic       rst_n,
  // L1 access stream
  input  logic       acc_valid,
  output logic       acc_ready,
  input  addr_t      acc_pc,
  input  addr_t      acc_addr,
  input  logic       acc_miss,       // demand miss
  input  logic       acc_pref_hit,   // hit on a line whose prefetch bit is set
  // prefetch requests
  output logic       pf_valid,
  input  logic       pf_ready,
  output addr_t      pf_addr,
  // prefetched line has arrived: its prefetch-MSHR entry is freed
  input  logic       fill_valid,
  input  addr_t      fill_addr,
  // event pulses
  output pf_events_t events
);
  localparam int unsigned HIST    = LDB_DELTAS;
  localparam int unsigned NADDR   = HIST + 1;
  localparam int unsigned LID_W   = $clog2(LDBS);
  localparam int unsigned CNT_W   = $clog2(HIST + 1);
  localparam int unsigned NA_W    = $clog2(NADDR + 1);
  localparam int unsigned DEG_W   = $clog2(DEGREE + 1);
  localparam int unsigned BI_W    = (DEGREE > 1) ? $clog2(DEGREE) : 1;

  if (GHB_ENTRIES + LDBS > (1 << GHB_PTR_W) - 1) begin : g_size_check
    $error("GHB entries plus LDBs must fit the 8-bit index-table index");
  end

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WALK, S_GHBUPD, S_PF, S_ISSUE} state_e;
  state_e state_q;

  // trigger being processed
  addr_t    cur_pc_q, cur_addr_q;
  logic     trim_en_q;
  ghb_ptr_t link_q;             // previous GHB head of the PC (or GHB_NULL)
  // history
  addr_t              hist_addr_q [NADDR];
  logic [NA_W-1:0]    n_addr_q;
  ghb_ptr_t           walk_ptr_q;
  delta_t             hist_q [HIST];
  logic [CNT_W-1:0]   hist_cnt_q;
  delta_t             lm_q;
  logic               conf_q;
  logic               is_ldb_q;
  logic [LID_W-1:0]   ldb_id_q;
  // global stride inputs
  logic   gs_ok_q [2];
  addr_t  gs_base_q [2], gs_succ_q [2];
  // prefetch buffer
  addr_t            buf_q [DEGREE];
  logic [DEG_W-1:0] buf_cnt_q, buf_i_q;

  // ---------------------------------------------------------------- blocks
  logic     it_lk_hit, it_upd_valid, it_evict;
  ghb_ptr_t it_lk_idx, it_upd_idx;
  index_table #(.ENTRIES(IT_SIZE), .WAYS(IT_ASSOC)) u_it (
    .clk, .rst_n,
    .lk_pc(cur_pc_q), .lk_hit(it_lk_hit), .lk_idx(it_lk_idx),
    .upd_valid(it_upd_valid), .upd_pc(cur_pc_q), .upd_idx(it_upd_idx),
    .upd_evict(it_evict));

  logic     ghb_push;
  ghb_ptr_t ghb_push_ptr, ghb_rd_link;
  logic     ghb_rd_ok, ghb_link_ok, ghb_succ_ok;
  addr_t    ghb_rd_addr, ghb_succ_addr;
  ghb #(.N(GHB_ENTRIES)) u_ghb (
    .clk, .rst_n,
    .push_valid(ghb_push), .push_addr(cur_addr_q), .push_link(link_q),
    .push_ptr(ghb_push_ptr),
    .rd_ptr(walk_ptr_q), .rd_ok(ghb_rd_ok), .rd_addr(ghb_rd_addr),
    .rd_link(ghb_rd_link), .rd_link_ok(ghb_link_ok),
    .rd_succ_addr(ghb_succ_addr), .rd_succ_ok(ghb_succ_ok));

  logic [LID_W-1:0] ldb_rd_id, ldb_victim;
  ldb_entry_t       ldb_rd, ldb_wr;
  logic             ldb_wr_valid;
  ldb_table #(.N(LDBS)) u_ldb (
    .clk, .rst_n,
    .rd_id(ldb_rd_id), .rd_entry(ldb_rd),
    .wr_valid(ldb_wr_valid), .wr_id(ldb_id_q), .wr_entry(ldb_wr),
    .victim_id(ldb_victim));

  logic   gs_match;
  delta_t gs_delta;
  global_stride_detect u_gs (
    .ok0(gs_ok_q[0]), .base0(gs_base_q[0]), .succ0(gs_succ_q[0]),
    .ok1(gs_ok_q[1]), .base1(gs_base_q[1]), .succ1(gs_succ_q[1]),
    .match(gs_match), .delta(gs_delta));

  addr_t            pff_addr [DEGREE];
  logic [DEG_W-1:0] pff_cnt;
  pf_kind_e         pff_kind;
  logic             pff_lm_update, pff_conf_next, pff_conf_trim;
  prefetch_function #(.HIST(HIST), .DEGREE(DEGREE)) u_pff (
    .cur_addr(cur_addr_q), .hist(hist_q), .hist_cnt(hist_cnt_q),
    .lm_stride(lm_q), .gs_valid(gs_match), .gs_delta(gs_delta),
    .conf_in(conf_q), .trim_en(trim_en_q),
    .pf_addr(pff_addr), .pf_cnt(pff_cnt), .kind(pff_kind),
    .lm_update(pff_lm_update),
    .conf_next(pff_conf_next), .conf_trim(pff_conf_trim));

  logic mshr_hit, mshr_ins;
  pf_mshr_filter #(.ENTRIES(MSHR_SIZE), .WAYS(MSHR_ASSOC)) u_mshr (
    .clk, .rst_n,
    .lk_line(line_of(buf_q[buf_i_q[BI_W-1:0]])), .lk_hit(mshr_hit),
    .ins_valid(mshr_ins), .ins_line(line_of(buf_q[buf_i_q[BI_W-1:0]])),
    .rel_valid(fill_valid), .rel_line(line_of(fill_addr)));

  // ------------------------------------------------------ combinational part
  logic   ldb_path;       // in S_LOOKUP: the PC owns a valid LDB
  logic   ghb_path;       // in S_LOOKUP: the PC has a GHB list
  delta_t walk_hist [HIST];
  logic [CNT_W-1:0] walk_cnt;
  logic   promote;

  always_comb begin
    ldb_rd_id = LID_W'(int'(it_lk_idx) - int'(GHB_ENTRIES));
    ldb_path  = it_lk_hit && int'(it_lk_idx) >= int'(GHB_ENTRIES)
                && int'(it_lk_idx) < int'(GHB_ENTRIES + LDBS)
                && ldb_rd.pc == cur_pc_q;
    ghb_path  = it_lk_hit && int'(it_lk_idx) < int'(GHB_ENTRIES);

    for (int i = 0; i < HIST; i++)
      walk_hist[i] = (i + 1 < int'(n_addr_q)) ? delta_t'(hist_addr_q[i] - hist_addr_q[i+1]) : '0;
    walk_cnt = CNT_W'(int'(n_addr_q) - 1);
    promote  = (int'(n_addr_q) == NADDR);

    acc_ready    = (state_q == S_IDLE);
    it_upd_valid = 1'b0;
    it_upd_idx   = link_q;
    ghb_push     = 1'b0;
    ldb_wr_valid = 1'b0;
    mshr_ins     = 1'b0;
    pf_valid     = 1'b0;
    pf_addr      = buf_q[buf_i_q[BI_W-1:0]];

    ldb_wr.pc        = cur_pc_q;
    ldb_wr.last_addr = cur_addr_q;
    ldb_wr.lm_stride = pff_lm_update ? hist_q[0] : lm_q;
    for (int i = 0; i < HIST; i++) ldb_wr.deltas[i] = hist_q[i];
    ldb_wr.conf      = pff_conf_next;

    events          = '0;
    events.kind     = pff_kind;

    unique case (state_q)
      S_IDLE: events.trigger = acc_valid && (acc_miss || acc_pref_hit);
      S_LOOKUP: begin
        if (ldb_path) begin
          it_upd_valid   = 1'b1;                  // refresh LRU, same index
          it_upd_idx     = it_lk_idx;
          events.ldb_hit = 1'b1;
        end else if (ghb_path) begin
          events.ghb_walk = 1'b1;
        end else begin
          events.it_miss = !it_lk_hit;
        end
      end
      S_WALK: ;
      S_GHBUPD: begin
        ghb_push     = 1'b1;
        it_upd_valid = 1'b1;
        it_upd_idx   = promote ? ghb_ptr_t'(GHB_ENTRIES + int'(ldb_victim)) : ghb_push_ptr;
        events.it_evict    = it_evict && !it_lk_hit;
        events.ldb_promote = promote;
      end
      S_PF: begin
        ldb_wr_valid     = is_ldb_q;
        events.pf_done   = 1'b1;
        events.conf_trim = pff_conf_trim;
      end
      S_ISSUE: begin
        if (mshr_hit) begin
          events.mshr_drop = 1'b1;
        end else begin
          pf_valid     = 1'b1;
          mshr_ins     = pf_ready;
          events.issue = pf_ready;
        end
      end
      default: ;
    endcase
  end

  // --------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      cur_pc_q   <= '0;
      cur_addr_q <= '0;
      trim_en_q  <= 1'b0;
      link_q     <= GHB_NULL;
      n_addr_q   <= '0;
      walk_ptr_q <= '0;
      hist_cnt_q <= '0;
      lm_q       <= '0;
      conf_q     <= 1'b0;
      is_ldb_q   <= 1'b0;
      ldb_id_q   <= '0;
      buf_cnt_q  <= '0;
      buf_i_q    <= '0;
      for (int i = 0; i < NADDR; i++) hist_addr_q[i] <= '0;
      for (int i = 0; i < HIST; i++) hist_q[i] <= '0;
      for (int i = 0; i < 2; i++) begin
        gs_ok_q[i]   <= 1'b0;
        gs_base_q[i] <= '0;
        gs_succ_q[i] <= '0;
      end
      for (int i = 0; i < DEGREE; i++) buf_q[i] <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (acc_valid && (acc_miss || acc_pref_hit)) begin
            cur_pc_q    <= acc_pc;
            cur_addr_q  <= acc_addr;
            trim_en_q   <= !acc_miss;
            gs_ok_q[0]  <= 1'b0;
            gs_ok_q[1]  <= 1'b0;
            state_q     <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          hist_addr_q[0] <= cur_addr_q;
          n_addr_q       <= NA_W'(1);
          lm_q           <= '0;
          conf_q         <= 1'b0;
          is_ldb_q       <= 1'b0;
          if (ldb_path) begin
            hist_q[0] <= delta_t'(cur_addr_q - ldb_rd.last_addr);
            for (int i = 1; i < HIST; i++) hist_q[i] <= delta_t'(ldb_rd.deltas[i-1]);
            hist_cnt_q <= CNT_W'(HIST);
            lm_q       <= delta_t'(ldb_rd.lm_stride);
            conf_q     <= ldb_rd.conf;
            is_ldb_q   <= 1'b1;
            ldb_id_q   <= ldb_rd_id;
            state_q    <= S_PF;
          end else if (ghb_path) begin
            link_q     <= it_lk_idx;
            walk_ptr_q <= it_lk_idx;
            state_q    <= S_WALK;
          end else begin
            link_q     <= GHB_NULL;
            state_q    <= S_GHBUPD;
          end
        end
        S_WALK: begin
          if (ghb_rd_ok) begin
            hist_addr_q[n_addr_q[NA_W-2:0]] <= ghb_rd_addr;
            n_addr_q              <= n_addr_q + 1'b1;
            if (int'(n_addr_q) <= 2) begin
              gs_ok_q[n_addr_q == NA_W'(2)]   <= ghb_succ_ok;
              gs_base_q[n_addr_q == NA_W'(2)] <= ghb_rd_addr;
              gs_succ_q[n_addr_q == NA_W'(2)] <= ghb_succ_addr;
            end
          end
          walk_ptr_q <= ghb_rd_link;
          if (!(ghb_rd_ok && ghb_link_ok && int'(n_addr_q) + 1 < NADDR))
            state_q <= S_GHBUPD;
        end
        S_GHBUPD: begin
          for (int i = 0; i < HIST; i++) hist_q[i] <= walk_hist[i];
          hist_cnt_q <= walk_cnt;
          if (promote) begin
            is_ldb_q <= 1'b1;
            ldb_id_q <= ldb_victim;
          end
          state_q <= S_PF;
        end
        S_PF: begin
          for (int i = 0; i < DEGREE; i++) buf_q[i] <= pff_addr[i];
          buf_cnt_q <= pff_cnt;
          buf_i_q   <= '0;
          state_q   <= (pff_cnt == '0) ? S_IDLE : S_ISSUE;
        end
        S_ISSUE: begin
          if (mshr_hit || pf_ready) begin
            buf_i_q <= buf_i_q + 1'b1;
            if (buf_i_q + 1'b1 == buf_cnt_q) state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A prefetch request, once offered, stays until it is taken.
  property p_pf_hold;
    @(posedge clk) disable iff (!rst_n)
      pf_valid && !pf_ready |=> pf_valid && $stable(pf_addr);
  endproperty
  a_pf_hold: assert property (p_pf_hold);

endmodule

// Index table of the GHB-LDB prefetcher.
//
// A PC-indexed, set-associative table. Each entry holds the PC tag and one
// 8-bit index whose meaning depends on its value: below GHB_N it points at the
// newest GHB entry of that PC (the head of the PC's linked list); from GHB_N
// upwards, index - GHB_N names the local delta buffer that holds the PC. This
// shared index field is the organisation drawn for the original design; the set/tag
// split and the replacement are this implementation's own: 32 sets chosen by PC[4:0],
// a 27-bit tag PC[31:5] and a 3-bit LRU rank per way, which together with the
// 8-bit index give the 38 bits per entry of the 256-entry, 8-way table
// (9728 bits). A valid bit per entry is added on top of that budget.
//
// Interface and timing:
//   lookup  - lk_pc in, lk_hit / lk_idx out, combinational, no side effect.
//   update  - when upd_valid is high at a clock edge, upd_pc gets index
//             upd_idx: the matching way is rewritten, otherwise the invalid or
//             least recently used way of the set is replaced (upd_evict tells,
//             combinationally, that an update of upd_pc would replace a valid
//             entry of another PC).
//             The written way becomes most recently used.
module index_table
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES = IT_ENTRIES,
  parameter int unsigned WAYS    = IT_WAYS
) (
  input  logic     clk,
  input  logic     rst_n,
  // lookup
  input  addr_t    lk_pc,
  output logic     lk_hit,
  output ghb_ptr_t lk_idx,
  // update / allocate
  input  logic     upd_valid,
  input  addr_t    upd_pc,
  input  ghb_ptr_t upd_idx,
  output logic     upd_evict
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = ADDR_W - SET_W;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [SET_W-1:0] set_t;

  logic     valid_q [SETS][WAYS];
  tag_t     tag_q   [SETS][WAYS];
  ghb_ptr_t idx_q   [SETS][WAYS];
  way_t     age_q   [SETS][WAYS];   // 0 = most recently used

  function automatic set_t set_of(addr_t pc);
    return pc[SET_W-1:0];
  endfunction
  function automatic tag_t tag_of(addr_t pc);
    return pc[ADDR_W-1:SET_W];
  endfunction

  // lookup port
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = GHB_NULL;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[set_of(lk_pc)][w] && tag_q[set_of(lk_pc)][w] == tag_of(lk_pc)) begin
        lk_hit = 1'b1;
        lk_idx = idx_q[set_of(lk_pc)][w];
      end
    end
  end

  // way chosen by the update port
  set_t u_set;
  logic u_hit, u_free;
  way_t u_hit_way, u_free_way, u_lru_way, u_way;
  always_comb begin
    u_set      = set_of(upd_pc);
    u_hit      = 1'b0;
    u_free     = 1'b0;
    u_hit_way  = '0;
    u_free_way = '0;
    u_lru_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[u_set][w] && tag_q[u_set][w] == tag_of(upd_pc)) begin
        u_hit     = 1'b1;
        u_hit_way = way_t'(w);
      end
      if (!valid_q[u_set][w]) begin
        u_free     = 1'b1;
        u_free_way = way_t'(w);
      end
      if (age_q[u_set][w] == way_t'(WAYS - 1)) u_lru_way = way_t'(w);
    end
    u_way     = u_hit ? u_hit_way : (u_free ? u_free_way : u_lru_way);
    upd_evict = !u_hit && !u_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
          idx_q[s][w]   <= GHB_NULL;
          age_q[s][w]   <= way_t'(w);
        end
      end
    end else if (upd_valid) begin
      valid_q[u_set][u_way] <= 1'b1;
      tag_q[u_set][u_way]   <= tag_of(upd_pc);
      idx_q[u_set][u_way]   <= upd_idx;
      for (int w = 0; w < WAYS; w++) begin
        if (way_t'(w) == u_way)                        age_q[u_set][w] <= '0;
        else if (age_q[u_set][w] < age_q[u_set][u_way]) age_q[u_set][w] <= age_q[u_set][w] + 1'b1;
      end
    end
  end

endmodule

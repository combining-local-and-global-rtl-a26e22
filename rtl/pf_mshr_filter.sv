// Prefetch MSHR used as a filter of redundant prefetches.
//
// Different instructions often ask for the same cache line (load B's a+8 and
// load C's b+16 fall in the line load A already prefetched). Every prefetch
// that leaves the prefetcher is recorded here by its line address; a later
// candidate for a recorded line is dropped. The organisation follows the original design:
// 256 entries, 8 ways, a 21-bit tag plus 3 bits per entry, which with 32 sets
// and 64-byte lines covers a 32-bit address. As in any MSHR, an entry stands
// for a request in flight: it is freed when the memory system reports that
// the prefetched line has arrived (release port). The 3 bits are read here as
// an LRU rank: when a set is full, its least recently used entry is
// overwritten rather than stalling the prefetcher. A valid bit per entry is
// added on top of the 24-bit budget. The release port and the overwrite are
// this implementation's choices.
//
// Interface and timing:
//   lookup  - lk_line in, lk_hit out, combinational, no side effect.
//   insert  - ins_valid at a clock edge records ins_line (in the invalid or
//             least recently used way of its set; a line already present is
//             only made most recently used).
//   release - rel_valid at a clock edge frees the entry of rel_line, if any.
//             When insert and release name the same line, release wins.
module pf_mshr_filter
  import pf_pkg::*;
#(
  parameter int unsigned ENTRIES = MSHR_ENTRIES,
  parameter int unsigned WAYS    = MSHR_WAYS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  line_t lk_line,
  output logic  lk_hit,
  input  logic  ins_valid,
  input  line_t ins_line,
  input  logic  rel_valid,
  input  line_t rel_line
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = LINE_W - SET_W;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [SET_W-1:0] set_t;

  logic valid_q [SETS][WAYS];
  tag_t tag_q   [SETS][WAYS];
  way_t age_q   [SETS][WAYS];

  always_comb begin
    lk_hit = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[lk_line[SET_W-1:0]][w] && tag_q[lk_line[SET_W-1:0]][w] == lk_line[LINE_W-1:SET_W])
        lk_hit = 1'b1;
  end

  set_t i_set;
  tag_t i_tag;
  logic i_hit, i_free;
  way_t i_hit_way, i_free_way, i_lru_way, i_way;
  always_comb begin
    i_set      = ins_line[SET_W-1:0];
    i_tag      = ins_line[LINE_W-1:SET_W];
    i_hit      = 1'b0;
    i_free     = 1'b0;
    i_hit_way  = '0;
    i_free_way = '0;
    i_lru_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[i_set][w] && tag_q[i_set][w] == i_tag) begin
        i_hit     = 1'b1;
        i_hit_way = way_t'(w);
      end
      if (!valid_q[i_set][w]) begin
        i_free     = 1'b1;
        i_free_way = way_t'(w);
      end
      if (age_q[i_set][w] == way_t'(WAYS - 1)) i_lru_way = way_t'(w);
    end
    i_way = i_hit ? i_hit_way : (i_free ? i_free_way : i_lru_way);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
          age_q[s][w]   <= way_t'(w);
        end
      end
    end else begin
      if (ins_valid) begin
        valid_q[i_set][i_way] <= 1'b1;
        tag_q[i_set][i_way]   <= i_tag;
        for (int w = 0; w < WAYS; w++) begin
          if (way_t'(w) == i_way)                        age_q[i_set][w] <= '0;
          else if (age_q[i_set][w] < age_q[i_set][i_way]) age_q[i_set][w] <= age_q[i_set][w] + 1'b1;
        end
      end
      if (rel_valid) begin
        for (int w = 0; w < WAYS; w++)
          if (tag_q[rel_line[SET_W-1:0]][w] == rel_line[LINE_W-1:SET_W])
            valid_q[rel_line[SET_W-1:0]][w] <= 1'b0;
      end
    end
  end

endmodule

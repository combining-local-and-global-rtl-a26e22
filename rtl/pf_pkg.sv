// Shared types and sizes of the GHB-LDB data prefetcher.
//
// The prefetcher watches the L1 data-cache access stream, keeps a short
// history of addresses per load/store PC (either as a linked list threaded
// through a global history buffer, or, for hot PCs, as a local delta buffer),
// and turns that history into prefetch addresses. The sizes below are those of
// the highest-performance design point (GHB-LDB-v1): a 256-entry 8-way index
// table, a 192-entry GHB with 8-bit links, 16 local delta buffers of 7 deltas
// and a 256-entry 8-way prefetch MSHR with 21-bit tags. The 64-byte line and
// the 32-set organisation follow from the 21-bit MSHR tag of a 32-bit address
// (32 - 6 offset bits - 5 set bits). The prefetch degree of 4 follows the
// worked filtering example (a miss on a prefetches b, c, d, e); the history
// depth of 8 addresses / 7 deltas matches the LDB so that both paths feed the
// same prefetch function. Those two are this implementation's reading, not given sizes.
package pf_pkg;

  parameter int unsigned ADDR_W      = 32;   // address and PC width
  parameter int unsigned LINE_OFS_W  = 6;    // 64-byte cache lines
  parameter int unsigned LINE_W      = ADDR_W - LINE_OFS_W;

  parameter int unsigned GHB_N       = 192;  // GHB entries
  parameter int unsigned GHB_PTR_W   = 8;    // GHB link / index-table index width
  parameter logic [GHB_PTR_W-1:0] GHB_NULL = '1;  // "no previous entry"

  parameter int unsigned N_LDB       = 16;   // local delta buffers
  parameter int unsigned LDB_ID_W    = 4;
  parameter int unsigned LDB_DELTAS  = 7;    // deltas kept per LDB

  parameter int unsigned IT_ENTRIES  = 256;  // index table entries
  parameter int unsigned IT_WAYS     = 8;

  parameter int unsigned MSHR_ENTRIES = 256; // prefetch MSHR entries
  parameter int unsigned MSHR_WAYS    = 8;

  parameter int unsigned PF_DEGREE   = 4;    // maximum prefetches per trigger

  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic signed [ADDR_W-1:0] delta_t;
  typedef logic [GHB_PTR_W-1:0]     ghb_ptr_t;
  typedef logic [LINE_W-1:0]        line_t;

  // Which rule of the prefetch function produced the candidates.
  typedef enum logic [2:0] {
    PF_NONE     = 3'd0,
    PF_PAIR     = 3'd1,  // delta correlation: last two deltas seen before
    PF_SINGLE   = 3'd2,  // single delta match: last delta seen before
    PF_SCALAR   = 3'd3,  // deltas doubling or halving (scalar stride)
    PF_GLOBAL   = 3'd4,  // global stride between this PC and its successor
    PF_FALLBACK = 3'd5   // last matched stride plus next line
  } pf_kind_e;

  // One pulse per event, for performance counting and for testing.
  typedef struct packed {
    logic trigger;       // a triggering access was accepted
    logic it_miss;       // PC not in the index table: new entry allocated
    logic it_evict;      // ... and that replaced another PC's entry
    logic ldb_hit;       // PC served from its local delta buffer
    logic ghb_walk;      // PC served by walking the GHB linked list
    logic ldb_promote;   // PC moved from the GHB to a local delta buffer
    logic conf_trim;     // confidence bit cut the prefetches to one
    logic mshr_drop;     // a candidate was dropped by the prefetch MSHR
    logic issue;         // a prefetch left the prefetcher
    pf_kind_e kind;      // rule used, valid with pf_done
    logic pf_done;       // the prefetch function ran this cycle
  } pf_events_t;

  // Contents of one local delta buffer (LDB): the PC it belongs to, the last
  // address, the last stride the prefetch function matched (0 = none), the
  // FIFO of the last deltas (index 0 newest) and the confidence bit that says
  // the full prefetch degree was already issued.
  typedef struct packed {
    addr_t                        pc;
    addr_t                        last_addr;
    addr_t                        lm_stride;
    logic [LDB_DELTAS-1:0][ADDR_W-1:0] deltas;
    logic                         conf;
  } ldb_entry_t;

  function automatic line_t line_of(addr_t a);
    return a[ADDR_W-1:LINE_OFS_W];
  endfunction

endpackage

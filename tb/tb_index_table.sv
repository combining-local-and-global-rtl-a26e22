// Self-checking testbench of index_table.
// Random updates and lookups on a pool of PCs that fall into three sets, so
// that sets overflow and the LRU way is replaced. A reference model keeps, per
// set, the PCs in most-recently-used order and checks hit, index and eviction.
module tb_index_table;
  import pf_pkg::*;
  localparam int unsigned ENTRIES = 256, WAYS = 8, SETS = ENTRIES / WAYS;

  logic clk = 0, rst_n = 0;
  addr_t lk_pc, upd_pc;
  logic lk_hit, upd_valid, upd_evict;
  ghb_ptr_t lk_idx, upd_idx;
  int checks = 0, failures = 0, n_evict = 0;

  index_table #(.ENTRIES(ENTRIES), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  // reference: per set, queue of {pc, idx}, front = most recently used
  typedef struct { addr_t pc; ghb_ptr_t idx; } ent_t;
  ent_t model [SETS][$];
  addr_t pool [30];

  function automatic int find(addr_t pc);
    int s = int'(pc % SETS);
    foreach (model[s][i]) if (model[s][i].pc == pc) return i;
    return -1;
  endfunction

  task automatic check_lookup(addr_t pc);
    int i;
    lk_pc = pc;
    #1;
    i = find(pc);
    checks++;
    if (lk_hit !== (i >= 0) || (i >= 0 && lk_idx !== model[int'(pc % SETS)][i].idx)) begin
      failures++;
      $display("FAIL lookup pc=%h hit=%0d idx=%0d exp_hit=%0d", pc, lk_hit, lk_idx, i >= 0);
    end
  endtask

  task automatic do_update(addr_t pc, ghb_ptr_t idx);
    int s = int'(pc % SETS);
    int i = find(pc);
    bit exp_evict;
    upd_pc = pc; upd_idx = idx; upd_valid = 1;
    #1;
    exp_evict = (i < 0) && model[s].size() == WAYS;
    if (exp_evict) n_evict++;
    checks++;
    if (upd_evict !== exp_evict) begin
      failures++;
      $display("FAIL evict pc=%h got %0d exp %0d", pc, upd_evict, exp_evict);
    end
    @(posedge clk); #1;
    upd_valid = 0;
    if (i >= 0) model[s].delete(i);
    else if (exp_evict) void'(model[s].pop_back());
    model[s].push_front('{pc, idx});
  endtask

  initial begin
    upd_valid = 0; upd_pc = 0; upd_idx = 0; lk_pc = 0;
    for (int i = 0; i < 30; i++)
      pool[i] = (addr_t'($urandom) << 5) | addr_t'((i % 3) * 7);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (pool[i]) check_lookup(pool[i]);
    for (int n = 0; n < 600; n++) begin
      automatic addr_t pc = pool[$urandom_range(29)];
      if ($urandom_range(1)) do_update(pc, ghb_ptr_t'($urandom));
      check_lookup(pool[$urandom_range(29)]);
    end
    checks++;
    if (n_evict == 0) begin failures++; $display("FAIL no eviction exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

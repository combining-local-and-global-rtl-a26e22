// Self-checking testbench of pf_mshr_filter.
// Inserts random line addresses drawn from a pool that covers three sets with
// ten lines each, so sets overflow, and releases random lines. A reference
// keeps each set's lines in most-recently-used order, at most 8, and checks
// every lookup.
module tb_pf_mshr_filter;
  import pf_pkg::*;
  localparam int unsigned ENTRIES = 256, WAYS = 8, SETS = ENTRIES / WAYS;

  logic clk = 0, rst_n = 0;
  line_t lk_line, ins_line, rel_line;
  logic lk_hit, ins_valid, rel_valid;
  int checks = 0, failures = 0, n_hit = 0, n_evict = 0, n_rel = 0;

  pf_mshr_filter #(.ENTRIES(ENTRIES), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  line_t model [SETS][$];
  line_t pool [30];

  function automatic int find(line_t l);
    int s = int'(l % SETS);
    foreach (model[s][i]) if (model[s][i] == l) return i;
    return -1;
  endfunction

  task automatic check_lookup(line_t l);
    lk_line = l;
    #1;
    checks++;
    if (lk_hit) n_hit++;
    if (lk_hit !== (find(l) >= 0)) begin
      failures++; $display("FAIL lookup %h got %0d", l, lk_hit);
    end
  endtask

  task automatic insert(line_t l);
    int s = int'(l % SETS);
    int i = find(l);
    ins_line = l; ins_valid = 1;
    @(posedge clk); #1;
    ins_valid = 0;
    if (i >= 0) model[s].delete(i);
    else if (model[s].size() == WAYS) begin void'(model[s].pop_back()); n_evict++; end
    model[s].push_front(l);
  endtask

  // free a line; an invalid way keeps its place in the LRU order, so the
  // reference only drops the line (a later insert fills a free way first)
  task automatic free_line(line_t l);
    int s = int'(l % SETS);
    int i = find(l);
    rel_line = l; rel_valid = 1;
    @(posedge clk); #1;
    rel_valid = 0;
    if (i >= 0) begin model[s].delete(i); n_rel++; end
  endtask

  initial begin
    ins_valid = 0; ins_line = 0; lk_line = 0; rel_valid = 0; rel_line = 0;
    for (int i = 0; i < 30; i++) pool[i] = (line_t'($urandom) << 5) | line_t'((i % 3) * 11);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    foreach (pool[i]) check_lookup(pool[i]);
    for (int n = 0; n < 600; n++) begin
      automatic line_t l = pool[$urandom_range(29)];
      if ($urandom_range(1)) insert(l);
      else if ($urandom_range(3) == 0) free_line(pool[$urandom_range(29)]);
      check_lookup(pool[$urandom_range(29)]);
    end
    checks++;
    if (n_hit == 0 || n_evict == 0 || n_rel == 0) begin failures++; $display("FAIL coverage"); end
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

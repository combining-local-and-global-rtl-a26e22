// End-to-end testbench of ghb_ldb_prefetcher at its full default size.
// Feeds access streams with the localities the prefetcher targets and checks
// what leaves it:
//   * a constant-stride PC: unknown PC, GHB walks of growing length, promotion
//     to an LDB after 8 triggers, then one new line per trigger (the rest is
//     dropped by the prefetch MSHR) and the confidence-bit trim on prefetched
//     hits; the latency of each path is checked against the edge counts;
//   * a repeating delta pattern a b c d (delta correlation);
//   * a common stride interrupted by large jumps (single match and the
//     last-matched-stride fallback);
//   * halving distances (scalar stride);
//   * two PCs a constant distance apart (global stride);
//   * many PCs in one index-table set and more hot PCs than LDBs (replacement);
//   * ordinary hits, which must be ignored, and random pf_ready back-pressure.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_ghb_ldb_prefetcher;
  import pf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic acc_valid, acc_ready, acc_miss, acc_pref_hit, pf_valid, pf_ready;
  addr_t acc_pc, acc_addr, pf_addr;
  logic fill_valid = 0;        // no fills: every issued line stays recorded
  addr_t fill_addr = '0;
  pf_events_t events;
  int checks = 0, failures = 0;

  ghb_ldb_prefetcher dut (.*);
  always #5 clk = ~clk;

  // ------------------------------------------------------------- monitor
  addr_t    issued [$];
  pf_kind_e last_kind;
  int       epos = 0, first_dec = -1, acc_edge = 0;
  bit       ever [line_t];    // every line ever prefetched
  bit       bp_random = 0;
  int n_trigger, n_it_miss, n_it_evict, n_ldb_hit, n_walk, n_promote, n_trim,
      n_drop, n_issue, n_stall, n_ignored;
  int n_kind [8];

  always @(posedge clk) epos++;

  always @(negedge clk) begin
    if (rst_n) begin
      if (events.trigger) n_trigger++;
      if (events.it_miss) n_it_miss++;
      if (events.it_evict) n_it_evict++;
      if (events.ldb_hit) n_ldb_hit++;
      if (events.ghb_walk) n_walk++;
      if (events.ldb_promote) n_promote++;
      if (events.conf_trim) n_trim++;
      if (events.mshr_drop) n_drop++;
      if (events.pf_done) begin n_kind[events.kind]++; last_kind = events.kind; end
      if ((pf_valid || events.mshr_drop) && first_dec < 0) first_dec = epos - acc_edge;
      if (pf_valid && pf_ready) begin n_issue++; issued.push_back(pf_addr); ever[line_of(pf_addr)] = 1; end
      if (pf_valid && !pf_ready) n_stall++;
      pf_ready <= bp_random ? 1'($urandom_range(1)) : 1'b1;
    end
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (first %0d, issued %p)", what, first_dec, issued); end
  endtask

  // One access; returns when the prefetcher is idle again.
  task automatic access(addr_t pc, addr_t a, bit miss = 1, bit pref = 0);
    issued.delete();
    first_dec = -1;
    @(negedge clk);
    while (!acc_ready) @(negedge clk);
    acc_valid = 1; acc_pc = pc; acc_addr = a; acc_miss = miss; acc_pref_hit = pref;
    @(posedge clk);
    #1;
    acc_edge = epos;
    acc_valid = 0;
    while (!acc_ready) @(negedge clk);
  endtask

  function automatic bit has(addr_t a);
    foreach (issued[i]) if (issued[i] == a) return 1;
    return 0;
  endfunction

  // the line of a was prefetched by this or an earlier trigger
  function automatic bit covered(addr_t a);
    return ever.exists(line_of(a));
  endfunction

  // ------------------------------------------------------------ stimulus
  localparam addr_t P_STRIDE = 32'h0040_0100, P_PAIR = 32'h0040_0204,
                    P_SOPLEX = 32'h0040_0308, P_MCF = 32'h0040_040C,
                    P_GA = 32'h0040_0510, P_GB = 32'h0040_0614;

  initial begin
    automatic addr_t base, a;
    automatic int dl [4] = '{64, 128, -32, 256};
    automatic int prev_drop, prev_ldb;
    acc_valid = 0; acc_pc = 0; acc_addr = 0; acc_miss = 0; acc_pref_hit = 0; pf_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. constant stride, demand misses
    base = 32'h1000_0000;
    for (int k = 0; k < 14; k++) begin
      access(P_STRIDE, base + 64 * k);
      if (k == 0) begin
        chk(first_dec == 3, "latency, unknown PC");
        chk(issued.size() == 1 && issued[0] == base + 64, "next line for an unknown PC");
      end else if (k < 8) begin
        chk(first_dec == 3 + k, $sformatf("latency, GHB walk of %0d", k));
      end else begin
        chk(first_dec == 2, "latency, LDB path");
      end
      if (k >= 2) chk(has(base + 64 * (k + 4)), $sformatf("stride prefetch %0d", k));
      if (k >= 9) chk(issued.size() == 1, $sformatf("only one new line at stride step %0d", k));
    end
    chk(n_promote == 1, "stride PC promoted once");
    // 2. prefetched hits on the same stream: the confidence bit trims
    for (int k = 14; k < 18; k++) begin
      access(P_STRIDE, base + 64 * k, 0, 1);
      chk(issued.size() == 1 && issued[0] == base + 64 * (k + 4), "trimmed prefetch");
    end
    chk(n_trim >= 4, "confidence trim");

    // 3. ordinary hits are ignored
    prev_ldb = n_ldb_hit;
    access(P_STRIDE, base + 64 * 18, 0, 0);
    chk(issued.size() == 0 && n_ldb_hit == prev_ldb, "ordinary hit ignored");
    n_ignored++;

    // 4. delta correlation a b c d
    a = 32'h2000_0000;
    for (int k = 0; k < 16; k++) begin
      access(P_PAIR, a);
      if (k >= 9) begin
        chk(last_kind == PF_PAIR, "pair rule on a b c d");
        chk(covered(a + dl[k % 4] + dl[(k + 1) % 4] + dl[(k + 2) % 4] + dl[(k + 3) % 4]),
            "pair prefetch four deltas ahead");
      end
      a = a + dl[k % 4];
    end

    // 5. common stride 68 interrupted by jumps (single match, fallback)
    a = 32'h3000_0000;
    for (int k = 0; k < 16; k++) begin
      automatic int d = (k % 2 == 0) ? 68 : 47000 + 64 * $urandom_range(8);
      access(P_SOPLEX, a);
      if (k >= 10 && k % 2 == 0 && last_kind == PF_FALLBACK)
        chk(covered(a + 68), "fallback uses last matched stride 68");
      a = a + d;
    end

    // 6. halving distances (scalar stride)
    for (int k = 0; k < 6; k++) begin
      a = 32'h4000_0000 + (32'h0010_0000 >> k);
      access(P_MCF, a);
      if (k >= 3) begin
        chk(last_kind == PF_SCALAR, "scalar rule on halving distances");
        chk(covered(32'h4000_0000 + (32'h0010_0000 >> (k + 1))), "scalar prefetch");
      end
    end

    // 7. global stride: B follows A at +512
    for (int k = 0; k < 6; k++) begin
      a = 32'h5000_0000 + 32'h1000 * $urandom_range(4000);
      access(P_GA, a);
      if (k >= 2) begin
        chk(last_kind == PF_GLOBAL, "global rule");
        chk(has(a + 512), "global stride prefetch");
      end
      access(P_GB, a + 512);
    end

    // 8. ten PCs in one index-table set; 20 more hot PCs than LDBs; back-pressure
    bp_random = 1;
    for (int r = 0; r < 2; r++)
      for (int p = 0; p < 10; p++)
        access(32'h0080_0000 + 32'h20 * p, 32'h6000_0000 + 32'h10000 * p + 64 * r);
    for (int p = 0; p < 20; p++)
      for (int k = 0; k < 8; k++)
        access(32'h0090_0003 + 32'h40 * p, 32'h7000_0000 + 32'h100000 * p + 128 * k);
    chk(n_promote >= 20, "hot PCs promoted");
    // the stride PC lost its LDB: it must rebuild its history from the GHB
    prev_ldb = n_ldb_hit;
    access(P_STRIDE, base + 64 * 40);
    chk(n_ldb_hit == prev_ldb, "reassigned LDB not used by its old PC");
    bp_random = 0;

    // mechanism coverage
    chk(n_it_miss > 0, "index table miss");
    chk(n_it_evict > 0, "index table eviction");
    chk(n_walk > 0, "GHB walk");
    chk(n_ldb_hit > 0, "LDB hit");
    chk(n_drop > 0, "MSHR drop");
    chk(n_stall > 0, "pf_ready back-pressure");
    chk(n_ignored > 0, "ignored access");
    chk(n_kind[PF_PAIR] > 0, "delta correlation");
    chk(n_kind[PF_SINGLE] > 0, "single delta match");
    chk(n_kind[PF_SCALAR] > 0, "scalar stride");
    chk(n_kind[PF_GLOBAL] > 0, "global stride");
    chk(n_kind[PF_FALLBACK] > 0, "fallback");
    $display("triggers %0d issued %0d dropped %0d promotions %0d ldb hits %0d walks %0d",
             n_trigger, n_issue, n_drop, n_promote, n_ldb_hit, n_walk);
    $display("rules: pair %0d single %0d scalar %0d global %0d fallback %0d trims %0d",
             n_kind[PF_PAIR], n_kind[PF_SINGLE], n_kind[PF_SCALAR], n_kind[PF_GLOBAL],
             n_kind[PF_FALLBACK], n_trim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

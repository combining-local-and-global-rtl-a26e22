// Kernel testbench of ghb_ldb_prefetcher: does it remove L1 misses?
// Three loops are turned into address streams with one PC per load/store:
//   * streaming over two arrays with 8-byte elements (plain strides);
//   * a sparse-matrix update loop: read value[j] and index[j], then
//     start[k] and len[k] for a data-dependent k (start and len are separate
//     arrays, so len[k] is always the same distance after start[k]), append
//     to col_idx[m++], and write row_idx[kk] / row_val[kk] at scattered kk;
//   * a heap walk: cmp doubles each step and node[cmp-1] and node[cmp]
//     (72-byte nodes) are read, so the distance between successive accesses
//     doubles, restarted from random positions.
// A direct-mapped 32 KiB L1 model with a prefetch bit per line is fed by the
// stream and, with no delay, by every prefetch issued; a second, identical
// model sees only the demand stream. Each prefetched line is reported back as
// filled one cycle after it is issued. For each loop the test checks that the
// prefetched cache has fewer misses than the plain one, and, for the strides,
// that at least half of the misses are removed. Prefetch timing (lateness) is
// not modelled.
module tb_kernels;
  import pf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic acc_valid, acc_ready, acc_miss, acc_pref_hit, pf_valid, pf_ready;
  addr_t acc_pc, acc_addr, pf_addr;
  logic fill_valid = 0;
  addr_t fill_addr = '0;
  pf_events_t events;
  int checks = 0, failures = 0;

  ghb_ldb_prefetcher dut (.*);
  always #5 clk = ~clk;

  localparam int SETS = 512;
  line_t tag_p [SETS];   // with prefetcher
  bit    val_p [SETS];
  bit    pbit  [SETS];
  line_t tag_b [SETS];   // baseline, no prefetcher
  bit    val_b [SETS];
  int miss_p, miss_b, pref_hits, n_pf;

  // prefetched lines go straight into the model and are reported as filled
  // in the next cycle
  always @(negedge clk) begin
    fill_valid <= rst_n && pf_valid && pf_ready;
    fill_addr  <= pf_addr;
    if (rst_n && pf_valid && pf_ready) begin
      automatic line_t l = line_of(pf_addr);
      automatic int s = int'(l % SETS);
      n_pf++;
      if (!(val_p[s] && tag_p[s] == l)) begin
        val_p[s] = 1; tag_p[s] = l; pbit[s] = 1;
      end
    end
  end

  task automatic access(addr_t pc, addr_t a);
    line_t l = line_of(a);
    int s = int'(l % SETS);
    bit hit = val_p[s] && tag_p[s] == l;
    bit ph = hit && pbit[s];
    if (!(val_b[s] && tag_b[s] == l)) begin miss_b++; val_b[s] = 1; tag_b[s] = l; end
    if (!hit) begin miss_p++; val_p[s] = 1; tag_p[s] = l; end
    if (ph) pref_hits++;
    pbit[s] = 0;
    @(negedge clk);
    while (!acc_ready) @(negedge clk);
    acc_valid = 1; acc_pc = pc; acc_addr = a; acc_miss = !hit; acc_pref_hit = ph;
    @(negedge clk);
    acc_valid = 0;
  endtask

  task automatic report(string name, int min_pct);
    int saved = miss_b - miss_p;
    $display("%-10s misses without %0d with %0d, prefetched hits %0d, prefetches %0d",
             name, miss_b, miss_p, pref_hits, n_pf);
    checks++;
    if (!(miss_p < miss_b) || saved * 100 < min_pct * miss_b) begin
      failures++; $display("FAIL %s: not enough misses removed", name);
    end
    miss_b = 0; miss_p = 0; pref_hits = 0; n_pf = 0;
  endtask

  initial begin
    acc_valid = 0; acc_pc = 0; acc_addr = 0; acc_miss = 0; acc_pref_hit = 0; pf_ready = 1;
    for (int s = 0; s < SETS; s++) begin val_p[s] = 0; val_b[s] = 0; pbit[s] = 0; tag_p[s] = 0; tag_b[s] = 0; end
    miss_p = 0; miss_b = 0; pref_hits = 0; n_pf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // streaming: c[i] = a[i] + b[i]
    for (int i = 0; i < 2000; i++) begin
      access(32'h0040_1000, 32'h1000_0000 + 8 * i);
      access(32'h0040_1004, 32'h1100_1040 + 8 * i);
      access(32'h0040_1008, 32'h1200_2080 + 8 * i);
    end
    report("stream", 50);

    // sparse-matrix update
    begin
      automatic int m = 0;
      for (int j = 0; j < 1500; j++) begin
        automatic int k = $urandom_range(4095);
        automatic int kk = $urandom_range(65535);
        access(32'h0040_2000, 32'h2000_0000 + 8 * j);      // value[j]
        if (j % 3 != 0) begin
          access(32'h0040_2004, 32'h2100_0000 + 4 * j);    // index[j]
          access(32'h0040_2008, 32'h2200_0000 + 4 * k);    // start[k]
          access(32'h0040_200C, 32'h2300_0000 + 4 * k);    // len[k]
          access(32'h0040_2010, 32'h2400_0000 + 4 * m);    // col_idx[m++]
          m++;
          access(32'h0040_2014, 32'h2500_0000 + 4 * kk);   // row_idx[kk]
          access(32'h0040_2018, 32'h2600_0000 + 8 * kk);   // row_val[kk]
        end
      end
    end
    report("sparse", 0);

    // heap walk with doubling index
    for (int r = 0; r < 300; r++) begin
      automatic int cmp = 1 + $urandom_range(2000);
      while (cmp < (1 << 18)) begin
        cmp = cmp * 2;
        access(32'h0040_3000, 32'h3000_0000 + 72 * (cmp - 1));
        access(32'h0040_3004, 32'h3000_0000 + 72 * cmp);
      end
    end
    report("heap", 25);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

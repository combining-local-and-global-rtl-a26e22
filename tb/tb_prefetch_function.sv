// Self-checking testbench of prefetch_function.
// Each case sets a delta history (newest first), the last matched stride, the
// global-stride input and the confidence inputs, and compares rule, candidate
// count, candidate addresses and the side outputs with values worked out by
// hand from the rules (stride, delta pair a b c d a b, single delta match,
// deltas scaled by 2, 4 or 8, global stride, fallback with and without a
// last matched stride, confidence trimming, zero deltas, short history).
module tb_prefetch_function;
  import pf_pkg::*;
  localparam int unsigned HIST = 7, DEGREE = 4;

  addr_t cur_addr;
  delta_t hist [HIST];
  logic [2:0] hist_cnt;
  delta_t lm_stride, gs_delta;
  logic gs_valid, conf_in, trim_en, lm_update, conf_next, conf_trim;
  addr_t pf_addr [DEGREE];
  logic [2:0] pf_cnt;
  pf_kind_e kind;
  int checks = 0, failures = 0;

  prefetch_function #(.HIST(HIST), .DEGREE(DEGREE)) dut (.*);

  localparam addr_t A = 32'h0001_0000;

  task automatic run(string name, int h [$], addr_t a, delta_t lm, bit gv, delta_t gd,
                     bit ci, bit te, pf_kind_e ek, addr_t exp [$], bit elm, bit ecn, bit etr);
    cur_addr = a; lm_stride = lm; gs_valid = gv; gs_delta = gd;
    conf_in = ci; trim_en = te;
    for (int i = 0; i < HIST; i++) hist[i] = (i < h.size()) ? delta_t'(h[i]) : delta_t'(32'h5A5A);
    hist_cnt = 3'(h.size());
    #1;
    checks++;
    if (kind != ek || int'(pf_cnt) != exp.size() || lm_update != elm
        || conf_next != ecn || conf_trim != etr) begin
      failures++;
      $display("FAIL %s: kind %s cnt %0d lm %0d conf %0d trim %0d", name, kind.name(), pf_cnt,
               lm_update, conf_next, conf_trim);
    end
    foreach (exp[k]) begin
      checks++;
      if (pf_addr[k] != exp[k]) begin
        failures++; $display("FAIL %s: addr %0d = %h, expected %h", name, k, pf_addr[k], exp[k]);
      end
    end
  endtask

  initial begin
    run("stride", '{64, 64, 64, 64, 64, 64, 64}, A, 0, 0, 0, 0, 0, PF_PAIR,
        '{A + 64, A + 128, A + 192, A + 256}, 1, 1, 0);
    run("pair abcd", '{128, 64, 256, -32, 128, 64}, A, 0, 0, 0, 0, 0, PF_PAIR,
        '{A - 32, A + 224, A + 288, A + 416}, 1, 1, 0);
    run("single", '{64, 24, 16, 8, 1000, 64}, A, 0, 0, 0, 0, 0, PF_SINGLE,
        '{A + 1000, A + 1008, A + 1024, A + 1048}, 1, 1, 0);
    run("scalar halving", '{-256, -512, -1024}, A, 0, 0, 0, 0, 0, PF_SCALAR,
        '{A - 128, A - 192, A - 224, A - 240}, 0, 1, 0);
    run("scalar doubling", '{400, 200, 100}, A, 0, 0, 0, 0, 0, PF_SCALAR,
        '{A + 800, A + 2400, A + 5600, A + 12000}, 0, 1, 0);
    run("scalar factor 4", '{1600, 400, 100}, A, 0, 0, 0, 0, 0, PF_SCALAR,
        '{A + 6400, A + 32000, A + 134400, A + 544000}, 0, 1, 0);
    run("scalar factor 8 down", '{-64, -512, -4096}, A, 0, 0, 0, 0, 0, PF_SCALAR,
        '{A - 8, A - 9}, 0, 0, 0);
    run("scalar factor 3 not detected", '{900, 300, 100}, A, 0, 0, 0, 0, 0, PF_FALLBACK,
        '{A + 64}, 0, 0, 0);
    run("scalar to zero", '{4, 8, 16}, A, 0, 0, 0, 0, 0, PF_SCALAR,
        '{A + 2, A + 3}, 0, 0, 0);
    run("global", '{100, 37}, A, 0, 1, 8, 0, 0, PF_GLOBAL, '{A + 8}, 0, 0, 0);
    run("fallback lm", '{47212, 68, 47316}, A + 4, 68, 0, 0, 0, 0, PF_FALLBACK,
        '{A + 72, A + 64}, 0, 0, 0);
    run("fallback next line", '{}, A + 16, 0, 0, 0, 0, 1, PF_FALLBACK, '{A + 64}, 0, 0, 0);
    run("trim", '{64, 64, 64, 64, 64, 64, 64}, A, 0, 0, 0, 1, 1, PF_PAIR,
        '{A + 256}, 1, 1, 1);
    run("no trim on miss", '{64, 64, 64}, A, 0, 0, 0, 1, 0, PF_PAIR,
        '{A + 64, A + 128, A + 192, A + 256}, 1, 1, 0);
    run("zero deltas", '{0, 0, 0}, A, 0, 0, 0, 0, 0, PF_FALLBACK, '{A + 64}, 0, 0, 0);
    run("short history", '{64}, A, 0, 0, 0, 0, 0, PF_FALLBACK, '{A + 64}, 0, 0, 0);
    run("local rule before global", '{64, 64}, A, 0, 1, 8, 0, 0, PF_SINGLE,
        '{A + 64, A + 128, A + 192, A + 256}, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

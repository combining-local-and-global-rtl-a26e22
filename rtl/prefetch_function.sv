// Prefetch function of the GHB-LDB prefetcher.
//
// Turns the local delta history of the triggering PC into up to DEGREE
// candidate prefetch addresses. hist[0] is the delta the current access just
// made, hist[1] the one before, and so on; hist_cnt of them are valid. The
// rules, tried in this order:
//   1. Delta correlation: the last two deltas (a, b) occurred before as a pair.
//      The deltas that followed that earlier pair are replayed, repeating with
//      the period they imply (a b c d a b -> c d a b).
//   2. Single delta match: only the last delta occurred before; the deltas
//      that followed it are replayed the same way.
//   3. Scalar stride: each of the last three deltas is 2, 4 or 8 times (or
//      that fraction of) the one before; the next deltas keep scaling by the
//      same power of two, as long as a division is exact.
//   4. Global stride: the PC's accesses are followed at a constant distance by
//      another instruction (gs_valid / gs_delta); one prefetch at that distance.
//   5. Otherwise two prefetches: the current address plus the last matched
//      stride (an approximation of the most common stride), and the next line.
// Candidates of rules 1-3 accumulate: address k is the current address plus
// the first k+1 predicted deltas. A zero last delta matches nothing.
// Rules 1, 2 and 5 and the confidence bit follow the original design; how the scalar
// stride is detected (power-of-two factors up to 8 only, which need no
// multiplier or divider), where the global stride sits in
// the order, and the order of the rules are this implementation's choices.
//
// Local redundancy filter: conf_next says that rules 1-3 produced the full
// degree. When the trigger is a hit on a prefetched line (trim_en) and the
// confidence bit is already set, the earlier triggers have covered all but
// the furthest candidate, so only that one is output (conf_trim).
// Last matched stride: when rule 1 or 2 matches, lm_update asks the caller to
// remember hist[0] as the PC's last matched stride.
//
// Interface and timing: purely combinational.
module prefetch_function
  import pf_pkg::*;
#(
  parameter int unsigned HIST   = LDB_DELTAS,
  parameter int unsigned DEGREE = PF_DEGREE,
  localparam int unsigned CNT_W = $clog2(HIST + 1),
  localparam int unsigned DEG_W = $clog2(DEGREE + 1),
  localparam int unsigned MAX_SCALE_SH = 3      // scale factors up to 2**3
) (
  input  addr_t             cur_addr,
  input  delta_t            hist [HIST],
  input  logic [CNT_W-1:0]  hist_cnt,
  input  delta_t            lm_stride,   // 0 = none
  input  logic              gs_valid,
  input  delta_t            gs_delta,
  input  logic              conf_in,
  input  logic              trim_en,
  output addr_t             pf_addr [DEGREE],
  output logic [DEG_W-1:0]  pf_cnt,
  output pf_kind_e          kind,
  output logic              lm_update,
  output logic              conf_next,
  output logic              conf_trim
);
  logic              pair_found, single_found, scal_up, scal_dn;
  int unsigned       scal_sh;
  logic              exact;
  int unsigned       pair_j, single_j, per, p;
  delta_t            pred [DEGREE];
  delta_t            sd;
  int unsigned       npred;
  addr_t             acc;
  addr_t             cand [DEGREE];

  always_comb begin
    // --- rule search ------------------------------------------------------
    pair_found   = 1'b0;
    single_found = 1'b0;
    pair_j       = 0;
    single_j     = 0;
    for (int j = HIST - 2; j >= 1; j--) begin
      if (j + 1 < int'(hist_cnt) && hist[j] == hist[0] && hist[j+1] == hist[1]) begin
        pair_found = 1'b1;
        pair_j     = j;
      end
    end
    for (int j = HIST - 1; j >= 1; j--) begin
      if (j < int'(hist_cnt) && hist[j] == hist[0]) begin
        single_found = 1'b1;
        single_j     = j;
      end
    end
    if (hist_cnt < 2 || hist[0] == '0) begin
      pair_found   = 1'b0;
      single_found = 1'b0;
    end
    // scale factors 2, 4 and 8 (shift by 1..3), smallest first
    scal_up = 1'b0;
    scal_dn = 1'b0;
    scal_sh = 1;
    for (int sh = MAX_SCALE_SH; sh >= 1; sh--) begin
      if (hist_cnt >= 3 && hist[0] != '0) begin
        if (hist[0] == (hist[1] <<< sh) && hist[1] == (hist[2] <<< sh)) begin
          scal_up = 1'b1; scal_dn = 1'b0; scal_sh = sh;
        end else if (hist[1] == (hist[0] <<< sh) && hist[2] == (hist[1] <<< sh)) begin
          scal_dn = 1'b1; scal_up = 1'b0; scal_sh = sh;
        end
      end
    end

    // --- predicted deltas -------------------------------------------------
    kind  = PF_NONE;
    npred = 0;
    per   = 1;
    p     = 0;
    sd    = hist[0];
    exact = 1'b1;
    for (int k = 0; k < DEGREE; k++) pred[k] = '0;
    if (pair_found || single_found) begin
      kind  = pair_found ? PF_PAIR : PF_SINGLE;
      per   = pair_found ? pair_j : single_j;
      npred = DEGREE;
      p     = per - 1;
      for (int k = 0; k < DEGREE; k++) begin
        pred[k] = hist[p];
        p = (p == 0) ? per - 1 : p - 1;
      end
    end else if (scal_up || scal_dn) begin
      kind = PF_SCALAR;
      sd   = hist[0];
      for (int k = 0; k < DEGREE; k++) begin
        // a division that is not exact ends the prediction
        if (!scal_up && (sd & ((delta_t'(1) <<< scal_sh) - 1)) != '0) exact = 1'b0;
        sd = scal_up ? (sd <<< scal_sh) : (sd >>> scal_sh);
        pred[k] = sd;
        if (exact && sd != '0 && npred == k) npred = k + 1;
      end
    end else if (gs_valid) begin
      kind  = PF_GLOBAL;
      npred = 1;
      pred[0] = gs_delta;
    end else begin
      kind = PF_FALLBACK;
    end

    // --- candidate addresses ----------------------------------------------
    acc = cur_addr;
    for (int k = 0; k < DEGREE; k++) begin
      acc     = acc + addr_t'(pred[k]);
      cand[k] = acc;
    end
    pf_cnt = DEG_W'(npred);
    if (kind == PF_FALLBACK) begin
      // last matched stride (if any) and the next line
      cand[0] = cur_addr + addr_t'(lm_stride);
      cand[1] = {line_of(cur_addr) + 1'b1, {LINE_OFS_W{1'b0}}};
      if (lm_stride != '0) begin
        pf_cnt = DEG_W'(2);
      end else begin
        cand[0] = cand[1];
        pf_cnt  = DEG_W'(1);
      end
    end

    conf_next = (kind == PF_PAIR || kind == PF_SINGLE || kind == PF_SCALAR)
                && npred == DEGREE;
    conf_trim = conf_next && conf_in && trim_en;
    for (int k = 0; k < DEGREE; k++) pf_addr[k] = cand[k];
    if (conf_trim) begin
      pf_addr[0] = cand[DEGREE-1];
      pf_cnt     = DEG_W'(1);
    end

    lm_update = pair_found || single_found;
  end

endmodule

// Global history buffer (GHB) of the GHB-LDB prefetcher.
//
// A circular FIFO of N trigger addresses in the order they occurred (the
// global address stream). Each entry also holds an 8-bit link to the previous
// entry of the same PC, so that the entries of one PC form a linked list that
// starts at the index table and runs from newest to oldest. Entry width is the
// original design's 32 + 8 bits; GHB_NULL (all ones) marks "no previous entry".
//
// Old entries are overwritten in place, so a link may point at a slot that
// now holds a newer, unrelated address. Such a stale link is recognised by age:
// following a link must always lead to an older entry, and one still inside
// the filled part of the buffer. rd_link_ok reports a link that passes.
// The global successor of an entry (the entry written right after it, used for
// global-stride detection) is read on a second port.
//
// Interface and timing:
//   push   - push_valid at a clock edge writes {push_addr, push_link} into slot
//            push_ptr (combinational: the slot the next push will use).
//   read   - rd_ptr in; rd_ok, rd_addr, rd_link, rd_link_ok, rd_succ_addr,
//            rd_succ_ok out, all combinational.
module ghb
  import pf_pkg::*;
#(
  parameter int unsigned N = GHB_N
) (
  input  logic     clk,
  input  logic     rst_n,
  // push
  input  logic     push_valid,
  input  addr_t    push_addr,
  input  ghb_ptr_t push_link,
  output ghb_ptr_t push_ptr,
  // read
  input  ghb_ptr_t rd_ptr,
  output logic     rd_ok,
  output addr_t    rd_addr,
  output ghb_ptr_t rd_link,
  output logic     rd_link_ok,
  output addr_t    rd_succ_addr,
  output logic     rd_succ_ok
);
  addr_t    addr_q [N];
  ghb_ptr_t link_q [N];
  ghb_ptr_t head_q;                  // next slot to write
  logic [GHB_PTR_W:0] fill_q;        // number of written slots, saturates at N

  // Age of a slot: 0 for the newest entry, N-1 for the oldest.
  function automatic int unsigned age_of(ghb_ptr_t p, ghb_ptr_t head);
    int unsigned t;
    t = int'(head) + N - 1 - int'(p);
    if (t >= N) t = t - N;
    return t;
  endfunction

  function automatic ghb_ptr_t next_ptr(ghb_ptr_t p);
    return (int'(p) == N - 1) ? '0 : p + 1'b1;
  endfunction

  int unsigned age_rd, age_link;
  always_comb begin
    push_ptr = head_q;
    rd_ok    = (int'(rd_ptr) < N);
    age_rd   = rd_ok ? age_of(rd_ptr, head_q) : 0;
    rd_ok    = rd_ok && (age_rd < int'(fill_q));
    rd_addr  = rd_ok ? addr_q[rd_ptr] : '0;
    rd_link  = rd_ok ? link_q[rd_ptr] : GHB_NULL;
    age_link = (int'(rd_link) < N) ? age_of(rd_link, head_q) : 0;
    rd_link_ok = rd_ok && (int'(rd_link) < N) && (age_link > age_rd)
                 && (age_link < int'(fill_q));
    rd_succ_ok   = rd_ok && (age_rd != 0);
    rd_succ_addr = rd_succ_ok ? addr_q[next_ptr(rd_ptr)] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      fill_q <= '0;
      for (int i = 0; i < N; i++) begin
        addr_q[i] <= '0;
        link_q[i] <= GHB_NULL;
      end
    end else if (push_valid) begin
      addr_q[head_q] <= push_addr;
      link_q[head_q] <= push_link;
      head_q         <= next_ptr(head_q);
      if (int'(fill_q) < N) fill_q <= fill_q + 1'b1;
    end
  end

endmodule

// Self-checking testbench of ghb.
// Uses a 12-entry buffer so that it wraps many times. Every push is kept in a
// reference list with its sequence number; a slot holds the newest push whose
// sequence number equals the slot modulo N. After each push every slot is read
// and address, link, link validity (the linked entry must be older than the
// read one) and global successor are checked against the list.
module tb_ghb;
  import pf_pkg::*;
  localparam int unsigned N = 12;

  logic clk = 0, rst_n = 0;
  logic push_valid;
  addr_t push_addr, rd_addr, rd_succ_addr;
  ghb_ptr_t push_link, push_ptr, rd_ptr, rd_link;
  logic rd_ok, rd_link_ok, rd_succ_ok;
  int checks = 0, failures = 0, n_link_ok = 0, n_link_stale = 0;

  ghb #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  addr_t    h_addr [$];
  ghb_ptr_t h_link [$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (ptr %0d)", what, rd_ptr); end
  endtask

  task automatic check_all();
    int total = h_addr.size();
    for (int p = 0; p < N + 2; p++) begin
      int sp = -1, sl = -1;
      rd_ptr = ghb_ptr_t'(p);
      #1;
      for (int s = 0; s < total; s++) if (s % N == p) sp = s;
      chk(rd_ok == (sp >= 0), "rd_ok");
      if (sp >= 0) begin
        chk(rd_addr == h_addr[sp], "rd_addr");
        chk(rd_link == h_link[sp], "rd_link");
        if (h_link[sp] != GHB_NULL)
          for (int s = 0; s < total; s++) if (s % N == int'(h_link[sp])) sl = s;
        chk(rd_link_ok == (sl >= 0 && sl < sp), "rd_link_ok");
        if (sl >= 0 && sl < sp) n_link_ok++;
        if (sl >= sp) n_link_stale++;
        chk(rd_succ_ok == (sp != total - 1), "rd_succ_ok");
        if (sp != total - 1) chk(rd_succ_addr == h_addr[sp+1], "rd_succ_addr");
      end
    end
  endtask

  initial begin
    push_valid = 0; push_addr = 0; push_link = GHB_NULL; rd_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check_all();
    for (int n = 0; n < 60; n++) begin
      automatic ghb_ptr_t exp_ptr = ghb_ptr_t'(n % N);
      push_addr  = $urandom;
      push_link  = ($urandom_range(3) == 0) ? GHB_NULL : ghb_ptr_t'($urandom_range(N - 1));
      push_valid = 1;
      #1;
      chk(push_ptr == exp_ptr, "push_ptr");
      @(posedge clk); #1;
      push_valid = 0;
      h_addr.push_back(push_addr);
      h_link.push_back(push_link);
      check_all();
    end
    chk(n_link_ok > 0 && n_link_stale > 0, "both valid and stale links seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

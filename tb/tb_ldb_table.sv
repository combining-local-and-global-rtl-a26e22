// Self-checking testbench of ldb_table.
// Writes random LDB contents to random LDBs, reads every LDB back after each
// write and checks the victim against a reference list kept in
// most-recently-used order (initially LDB 0 is the most recent, LDB N-1 the
// victim).
module tb_ldb_table;
  import pf_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 0, rst_n = 0;
  logic [3:0] rd_id, wr_id, victim_id;
  ldb_entry_t rd_entry, wr_entry;
  logic wr_valid;
  int checks = 0, failures = 0;

  ldb_table #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  ldb_entry_t model [N];
  int mru [$];

  function automatic ldb_entry_t rand_entry();
    ldb_entry_t e;
    e.pc = $urandom; e.last_addr = $urandom; e.lm_stride = $urandom;
    for (int i = 0; i < LDB_DELTAS; i++) e.deltas[i] = $urandom;
    e.conf = 1'($urandom);
    return e;
  endfunction

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      rd_id = 4'(i);
      #1;
      checks++;
      if (rd_entry != model[i]) begin failures++; $display("FAIL read LDB %0d", i); end
    end
    checks++;
    if (victim_id != 4'(mru[N-1])) begin
      failures++; $display("FAIL victim %0d exp %0d", victim_id, mru[N-1]);
    end
  endtask

  initial begin
    wr_valid = 0; wr_id = 0; wr_entry = '0; rd_id = 0;
    for (int i = 0; i < N; i++) begin model[i] = '0; mru.push_back(i); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check_all();
    for (int n = 0; n < 200; n++) begin
      automatic int id = (n % 3 == 0) ? int'(victim_id) : $urandom_range(N - 1);
      wr_id = 4'(id); wr_entry = rand_entry(); wr_valid = 1;
      @(posedge clk); #1;
      wr_valid = 0;
      model[id] = wr_entry;
      foreach (mru[k]) if (mru[k] == id) begin mru.delete(k); break; end
      mru.push_front(id);
      check_all();
    end
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

// Table of local delta buffers (LDBs) of the GHB-LDB prefetcher.
//
// An LDB keeps the recent history of one hot PC locally, so that its
// prefetches need no walk of the GHB linked list: the PC, its last address,
// the last stride the prefetch function matched, a FIFO of the last 7 address
// deltas and a confidence bit (the full prefetch degree has been issued and
// only one new prefetch is needed per prefetched hit). Those fields and their
// 32-bit widths follow the original design; with a 4-bit LRU rank they make the
// 7*32+32+32+32+5 = 325 bits per LDB, 16 LDBs. The index table names an LDB
// by its number; an LDB whose PC no longer matches has been reassigned.
// Replacement by least recently used is this implementation's reading of the 4 spare
// bits per LDB.
//
// Interface and timing:
//   read   - rd_id in, rd_entry out, combinational.
//   write  - wr_valid at a clock edge writes wr_entry into LDB wr_id and makes
//            it most recently used.
//   victim - victim_id: the least recently used LDB, combinational.
module ldb_table
  import pf_pkg::*;
#(
  parameter int unsigned N   = N_LDB,
  localparam int unsigned ID_W = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] rd_id,
  output ldb_entry_t      rd_entry,
  input  logic            wr_valid,
  input  logic [ID_W-1:0] wr_id,
  input  ldb_entry_t      wr_entry,
  output logic [ID_W-1:0] victim_id
);
  ldb_entry_t      ent_q [N];
  logic [ID_W-1:0] age_q [N];   // 0 = most recently used

  always_comb begin
    rd_entry  = ent_q[rd_id];
    victim_id = '0;
    for (int i = 0; i < N; i++)
      if (age_q[i] == ID_W'(N - 1)) victim_id = ID_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        ent_q[i] <= '0;
        age_q[i] <= ID_W'(i);
      end
    end else if (wr_valid) begin
      ent_q[wr_id] <= wr_entry;
      for (int i = 0; i < N; i++) begin
        if (ID_W'(i) == wr_id)             age_q[i] <= '0;
        else if (age_q[i] < age_q[wr_id]) age_q[i] <= age_q[i] + 1'b1;
      end
    end
  end

endmodule

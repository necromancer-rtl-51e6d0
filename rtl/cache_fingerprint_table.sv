// cache_fingerprint_table: coarse distribution of committed cache accesses.
//
// ENTRIES counters (32 in the evaluated configuration). A committed access
// whose block address has low bits equal to i increments counter i, so over a
// disabling interval the table records how accesses spread over the cache
// index space. Up to NIN accesses are counted per cycle. On `snap` (end of an
// interval) the counters are copied to `snap_cnt` and cleared; accesses that
// arrive in the snapshot cycle count toward the new interval. `clear` empties
// both (resynchronization). Counters saturate at their maximum.
// The counter width and the snapshot-cycle rule are implementation choices.
module cache_fingerprint_table #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned NIN     = 6,
  parameter int unsigned CNT_W   = 16,
  parameter int unsigned W       = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [NIN-1:0]                inc_valid,
  input  logic [NIN-1:0][W-1:0]         inc_addr,
  input  logic                          snap,
  output logic [ENTRIES-1:0][CNT_W-1:0] snap_cnt
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0][CNT_W-1:0] cnt_q;
  logic [ENTRIES-1:0][CNT_W-1:0] add, nxt;

  // Number of this cycle's accesses that fall on each entry.
  always_comb begin
    add = '0;
    for (int i = 0; i < NIN; i++)
      if (inc_valid[i]) add[inc_addr[i][IW-1:0]] = add[inc_addr[i][IW-1:0]] + 1'b1;
  end

  // Next counts: restart from zero at a snapshot, saturate at the maximum.
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      logic [CNT_W:0] s;
      s = (snap ? {(CNT_W+1){1'b0}} : {1'b0, cnt_q[e]}) + {1'b0, add[e]};
      nxt[e] = s[CNT_W] ? {CNT_W{1'b1}} : s[CNT_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      snap_cnt <= '0;
    end else if (clear) begin
      cnt_q    <= '0;
      snap_cnt <= '0;
    end else begin
      if (snap) snap_cnt <= cnt_q;
      cnt_q <= nxt;
    end
  end

endmodule

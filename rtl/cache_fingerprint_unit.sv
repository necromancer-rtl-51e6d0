// cache_fingerprint_unit: undead-core side of cache-hint disabling.
//
// Two cache_fingerprint_table instances count the committed D-cache accesses
// (load/store addresses) and I-cache accesses (instruction PCs) of the
// undead core. A disabling interval ends whenever the committed count crosses
// a multiple of INTERVAL (1K instructions); both tables are then snapshotted
// and cleared, and the next cycles send the snapshot to the animator core as
// 2*ENTRIES/NSLOT queue packets (D table first), each slot holding
// {index, count} with type T_DFP or T_IFP and the interval-end count as age tag.
// Because intervals are cut at absolute multiples of INTERVAL and the counts
// are equal after a resynchronization, the animator cuts the same intervals.
//
// Interface: the commit group `commit` is counted when `commit_fire` is high;
// `count_before`/`count_after` are the committed counts around the group.
// pkt_valid/pkt/pkt_ready is a valid/ready source into the queue arbiter.
// `stall_commit` holds the undead core only if an interval could end while
// the previous fingerprint is still being sent. After `flush`
// (resynchronization) the first, partial interval is counted but not sent.
// The packet layout, the stall rule and the partial-interval rule are
// implementation choices. The slot fields are sized for up to 256 entries
// and 24-bit counts, so with 32 entries of 16-bit counters some packet bits
// are always zero.
module cache_fingerprint_unit
  import nm_pkg::*;
#(
  parameter int unsigned ENTRIES  = 32,
  parameter int unsigned INTERVAL = 1024,
  parameter int unsigned COMMIT_W = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  commit_t [COMMIT_W-1:0]    commit,
  input  logic                      commit_fire,
  input  logic [AGE_W-1:0]          count_before,
  input  logic [AGE_W-1:0]          count_after,
  output logic                      pkt_valid,
  output nm_packet_t                pkt,
  input  logic                      pkt_ready,
  output logic                      stall_commit
);
  localparam int unsigned CNT_W = 16;
  localparam int unsigned LOG_I = $clog2(INTERVAL);
  localparam int unsigned NPKT  = 2 * ENTRIES / NSLOT;
  localparam int unsigned KW    = $clog2(NPKT);

  logic [COMMIT_W-1:0]              d_v, i_v;
  logic [COMMIT_W-1:0][PAY_W-1:0]   d_a, i_a;
  logic                             iend;
  logic [ENTRIES-1:0][CNT_W-1:0]    d_snap, i_snap;
  logic                             busy_q, partial_q;
  logic [KW-1:0]                    k_q;
  logic [AGE_W-1:0]                 age_q;

  always_comb begin
    for (int i = 0; i < COMMIT_W; i++) begin
      d_v[i] = commit_fire && commit[i].valid && commit[i].is_mem;
      i_v[i] = commit_fire && commit[i].valid;
      d_a[i] = blk_addr(commit[i].addr);
      i_a[i] = blk_addr(commit[i].pc);
    end
  end

  assign iend = commit_fire && (count_before[AGE_W-1:LOG_I] != count_after[AGE_W-1:LOG_I]);

  cache_fingerprint_table #(.ENTRIES(ENTRIES), .NIN(COMMIT_W), .CNT_W(CNT_W), .W(PAY_W)) u_dtab (
    .clk, .rst_n, .clear(flush), .inc_valid(d_v), .inc_addr(d_a), .snap(iend), .snap_cnt(d_snap));
  cache_fingerprint_table #(.ENTRIES(ENTRIES), .NIN(COMMIT_W), .CNT_W(CNT_W), .W(PAY_W)) u_itab (
    .clk, .rst_n, .clear(flush), .inc_valid(i_v), .inc_addr(i_a), .snap(iend), .snap_cnt(i_snap));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      partial_q <= 1'b1;
      k_q       <= '0;
      age_q     <= '0;
    end else if (flush) begin
      busy_q    <= 1'b0;
      partial_q <= 1'b1;
      k_q       <= '0;
    end else begin
      if (iend) begin
        partial_q <= 1'b0;
        busy_q    <= !partial_q;
        k_q       <= '0;
        age_q     <= {count_after[AGE_W-1:LOG_I], {LOG_I{1'b0}}};
      end else if (busy_q && pkt_ready) begin
        k_q <= k_q + 1'b1;
        if (k_q == KW'(NPKT - 1)) busy_q <= 1'b0;
      end
    end
  end

  always_comb begin
    int unsigned e;
    pkt       = '0;
    pkt.age   = age_q;
    pkt_valid = busy_q;
    for (int j = 0; j < NSLOT; j++) begin
      e = (int'(k_q) * NSLOT + j) % ENTRIES;
      pkt.slot[j].valid = 1'b1;
      if (int'(k_q) < NPKT / 2) begin
        pkt.slot[j].typ = T_DFP;
        pkt.slot[j].pay = {8'(e), 24'(d_snap[e])};
      end else begin
        pkt.slot[j].typ = T_IFP;
        pkt.slot[j].pay = {8'(e), 24'(i_snap[e])};
      end
    end
  end

  assign stall_commit = busy_q &&
      (int'(count_before[LOG_I-1:0]) >= int'(INTERVAL) - int'(COMMIT_W));

endmodule

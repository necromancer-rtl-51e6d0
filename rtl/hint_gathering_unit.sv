// hint_gathering_unit: undead-core side producer of execution hints.
//
// Every cycle the unit looks at the instructions the undead core commits
// (up to COMMIT_W = 6). Each committed instruction gives an I-cache hint (the
// block address of its PC), a committed load/store gives a D-cache hint (its
// data block address) and a committed branch gives a branch hint ({taken,
// low PC bits}), the update the undead core's predictor just received. Cache
// hints pass through a 2-entry CAM each (hint_filter_cam) that drops blocks
// sent recently. Hint types disabled by the animator side (`hint_dis`,
// index HK_D/HK_I/HK_BP) are not gathered at all. The surviving hints of a
// commit group are tagged with their type and grouped, NSLOT per packet, under
// one age tag: the committed-instruction count after the group.
//
// Queue interface: q_push_valid/q_push_pkt/q_push_ready. Fingerprint packets
// from the cache_fingerprint_unit (fp_*) are pushed ahead of hint packets.
// Stall: `commit_ready` is high when this cycle's packet drains all pending
// hints of the previous group (or none are pending) and the fingerprint unit
// does not hold commit; a full queue therefore stalls the undead core.
// commit_fire, count_before and count_after tell the fingerprint unit what
// was committed. `resync` empties the pending hints and the CAMs and loads the
// committed count with `resync_count` (the animator's count).
// The packet grouping, the priority of fingerprints and the stall rule are
// implementation choices; hint sources, CAM filtering, type and age tags
// follow the coupled-core scheme.
module hint_gathering_unit
  import nm_pkg::*;
#(
  parameter int unsigned COMMIT_W = 6,
  parameter int unsigned DCAM     = 2,
  parameter int unsigned ICAM     = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  commit_t [COMMIT_W-1:0] commit,
  output logic                   commit_ready,
  output logic                   commit_fire,
  output logic [AGE_W-1:0]       count_before,
  output logic [AGE_W-1:0]       count_after,
  input  logic [2:0]             hint_dis,
  input  logic                   fp_valid,
  input  nm_packet_t             fp_pkt,
  output logic                   fp_ready,
  input  logic                   fp_stall,
  output logic                   q_push_valid,
  output nm_packet_t             q_push_pkt,
  input  logic                   q_push_ready,
  input  logic                   resync,
  input  logic [AGE_W-1:0]       resync_count
);
  localparam int unsigned NP = 3 * COMMIT_W;
  localparam int unsigned CW = $clog2(NP + 1);

  logic [AGE_W-1:0]              count_q;
  hint_slot_t [NP-1:0]           pend_q, pend_d, cand;
  logic [AGE_W-1:0]              age_q;
  logic [COMMIT_W-1:0]           dv, iv, dkeep, ikeep;
  logic [COMMIT_W-1:0][PAY_W-1:0] da, ia;
  logic [CW-1:0]                 pend_cnt;
  logic [$clog2(COMMIT_W+1)-1:0] ncommit;
  logic                          any_commit, drain, hint_pkt_valid;
  nm_packet_t                    hpkt;
  logic [NP-1:0]                 taken_mask;

  // Candidate hints of the offered commit group.
  always_comb begin
    ncommit    = '0;
    any_commit = 1'b0;
    for (int i = 0; i < COMMIT_W; i++) begin
      dv[i] = commit[i].valid && commit[i].is_mem && !hint_dis[HK_D];
      iv[i] = commit[i].valid && !hint_dis[HK_I];
      da[i] = blk_addr(commit[i].addr);
      ia[i] = blk_addr(commit[i].pc);
      if (commit[i].valid) begin
        ncommit    = ncommit + 1'b1;
        any_commit = 1'b1;
      end
    end
  end

  hint_filter_cam #(.ENTRIES(DCAM), .NIN(COMMIT_W), .W(PAY_W)) u_dcam (
    .clk, .rst_n, .flush(resync), .in_valid(dv), .in_addr(da), .keep(dkeep), .update(commit_fire));
  hint_filter_cam #(.ENTRIES(ICAM), .NIN(COMMIT_W), .W(PAY_W)) u_icam (
    .clk, .rst_n, .flush(resync), .in_valid(iv), .in_addr(ia), .keep(ikeep), .update(commit_fire));

  always_comb begin
    for (int i = 0; i < COMMIT_W; i++) begin
      cand[3*i]   = '{valid: ikeep[i], typ: T_IHINT, pay: ia[i]};
      cand[3*i+1] = '{valid: dkeep[i], typ: T_DHINT, pay: da[i]};
      cand[3*i+2] = '{valid: commit[i].valid && commit[i].is_br && !hint_dis[HK_BP],
                      typ: T_BHINT, pay: {commit[i].taken, commit[i].pc[2 +: PAY_W-1]}};
    end
  end

  // Packet of the first NSLOT pending hints.
  always_comb begin
    int unsigned n;
    n          = 0;
    hpkt       = '0;
    hpkt.age   = age_q;
    taken_mask = '0;
    pend_cnt   = '0;
    for (int p = 0; p < NP; p++) begin
      if (pend_q[p].valid) begin
        pend_cnt = pend_cnt + 1'b1;
        if (n < NSLOT) begin
          hpkt.slot[n]  = pend_q[p];
          taken_mask[p] = 1'b1;
          n++;
        end
      end
    end
    hint_pkt_valid = (pend_cnt != '0);
  end

  always_comb begin
    fp_ready     = q_push_ready;
    q_push_valid = fp_valid || hint_pkt_valid;
    q_push_pkt   = fp_valid ? fp_pkt : hpkt;
    drain        = !fp_valid && hint_pkt_valid && q_push_ready;
    commit_ready = !fp_stall && !resync &&
                   ((pend_cnt == '0) || (pend_cnt <= CW'(NSLOT) && drain));
    commit_fire  = commit_ready && any_commit;
    count_before = count_q;
    count_after  = count_q + AGE_W'(ncommit);
  end

  always_comb begin
    pend_d = pend_q;
    if (drain)
      for (int p = 0; p < NP; p++)
        if (taken_mask[p]) pend_d[p].valid = 1'b0;
    if (commit_fire) pend_d = cand;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      age_q   <= '0;
      pend_q  <= '0;
    end else if (resync) begin
      count_q <= resync_count;
      pend_q  <= '0;
    end else begin
      pend_q <= pend_d;
      if (commit_fire) begin
        count_q <= count_after;
        age_q   <= count_after;
      end
    end
  end

endmodule

// nm_coupling: one undead core coupled to one animator core.
//
// The undead core (a defective 6-wide out-of-order core) runs the program
// ahead of the animator core (a small 2-wide core) and is trusted for nothing
// but hints. This module holds all logic added between the two cores:
//
//   undead side : hint_gathering_unit (with two hint_filter_cam),
//                 cache_fingerprint_unit, undead_mem_filter
//   link        : nm_comm_queue (single queue, 15-cycle delay)
//   animator    : hint_distribution_unit, dcache_hint_arbiter,
//                 nm_branch_predictor, two cache_fingerprint_table (the
//                 animator's own distributions), hint_disabling_unit,
//                 resync_controller
//
// Flow: committed undead instructions -> hints tagged with type and committed
// count -> queue -> released when the animator's committed count comes within
// the type's release window -> D-cache prefetch on a free D-cache port,
// I-cache prefetch on the added I-cache port, NM predictor training. Every
// 1K committed instructions both cores' access distributions are compared;
// a dissimilar type (or a losing NM predictor) is disabled for a back-off
// period, and the first disable triggers a resynchronization that copies the
// animator's registers and PC into the undead core.
//
// Core interfaces (the cores themselves are outside):
//   u_commit/u_commit_ready : undead commit group and its stall
//   u_squash, u_arf_wr_*, u_pc_wr_* : resynchronization of the undead core
//   u_wb_*, u_fill_*, l2_*, mem_resp_* : undead L1 <-> shared L2 path
//   a_commit, a_hold        : animator commit group; a_hold stops it
//   a_dc_busy, a_dpf_*      : animator D-cache port use and prefetches
//   a_ipf_*                 : prefetch port of the animator I-cache
//   a_bp_*                  : animator branch prediction and resolution
//   a_arf_rd_*, a_pc        : animator architectural state for copying
// The animator's committed count is kept here from a_commit.
module nm_coupling
  import nm_pkg::*;
#(
  parameter int unsigned U_COMMIT_W = 6,
  parameter int unsigned A_COMMIT_W = 2,
  parameter int unsigned QDEPTH     = 32,
  parameter int unsigned QDELAY     = 15,
  parameter int unsigned INTERVAL   = 1024,
  parameter int unsigned FP_ENTRIES = 32,
  parameter int unsigned BACKOFF    = 4096,
  parameter int unsigned BHT        = 1024,
  parameter int unsigned NREG       = 64,
  parameter int unsigned LINE_W     = 512
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           force_resync,
  // undead core
  input  commit_t [U_COMMIT_W-1:0]       u_commit,
  output logic                           u_commit_ready,
  output logic                           u_squash,
  output logic                           u_arf_wr_en,
  output logic [$clog2(NREG)-1:0]        u_arf_wr_idx,
  output logic [63:0]                    u_arf_wr_data,
  output logic                           u_pc_wr_en,
  output logic [VA_W-1:0]                u_pc_wr,
  input  logic                           u_wb_valid,
  input  logic [VA_W-BLK_OFF-1:0]        u_wb_addr,
  input  logic [LINE_W-1:0]              u_wb_data,
  input  logic                           u_fill_req_valid,
  input  logic [VA_W-BLK_OFF-1:0]        u_fill_req_addr,
  input  logic [2:0]                     u_fill_req_id,
  output logic                           u_fill_req_ready,
  output logic                           u_fill_resp_valid,
  output logic [2:0]                     u_fill_resp_id,
  output logic [LINE_W-1:0]              u_fill_resp_data,
  output logic                           l2_req_valid,
  output logic [VA_W-BLK_OFF-1:0]        l2_req_addr,
  output logic [2:0]                     l2_req_id,
  input  logic                           l2_req_ready,
  input  logic                           l2_resp_valid,
  input  logic [2:0]                     l2_resp_id,
  input  logic                           l2_resp_hit,
  input  logic [LINE_W-1:0]              l2_resp_data,
  input  logic                           mem_resp_valid,
  input  logic [2:0]                     mem_resp_id,
  // animator core
  input  commit_t [A_COMMIT_W-1:0]       a_commit,
  output logic                           a_hold,
  input  logic [1:0]                     a_dc_busy,
  output logic [1:0]                     a_dpf_valid,
  output logic [PAY_W-1:0]               a_dpf_addr,
  output logic                           a_ipf_valid,
  output logic [PAY_W-1:0]               a_ipf_addr,
  input  logic                           a_ipf_ready,
  input  logic [VA_W-1:0]                a_bp_pred_pc,
  output logic                           a_bp_pred_taken,
  input  logic                           a_bp_res_valid,
  input  logic [VA_W-1:0]                a_bp_res_pc,
  input  logic                           a_bp_res_taken,
  output logic [$clog2(NREG)-1:0]        a_arf_rd_idx,
  input  logic [63:0]                    a_arf_rd_data,
  input  logic [VA_W-1:0]                a_pc,
  // status
  output logic [2:0]                     hint_dis,
  output logic [AGE_W-1:0]               anim_count,
  output logic [AGE_W-1:0]               undead_count,
  output logic [31:0]                    resyncs,
  output logic [$clog2(QDEPTH+1)-1:0]    q_count,
  output logic                           bp_use_nm,
  output logic [31:0]                    wb_dropped,
  output logic [31:0]                    mem_dropped
);
  localparam int unsigned FP_CNT_W = 16;
  localparam int unsigned LOG_I    = $clog2(INTERVAL);

  // ---------------- undead side ----------------
  logic                  g_commit_ready, g_fire, fp_valid, fp_ready, fp_stall;
  logic [AGE_W-1:0]      cnt_before, cnt_after;
  nm_packet_t            fp_pkt, push_pkt, pop_pkt;
  logic                  push_valid, push_ready, pop_valid, pop_ready;
  logic                  rs_squash, rs_done, u_hold, rs_flush;
  commit_t [U_COMMIT_W-1:0] u_commit_g;

  always_comb begin
    u_commit_g = u_commit;
    for (int i = 0; i < U_COMMIT_W; i++) u_commit_g[i].valid = u_commit[i].valid && !u_hold;
  end
  assign u_commit_ready = g_commit_ready && !u_hold;
  assign rs_flush       = rs_squash || rs_done;
  assign u_squash       = rs_squash;
  assign undead_count   = cnt_before;

  hint_gathering_unit #(.COMMIT_W(U_COMMIT_W)) u_gather (
    .clk, .rst_n, .commit(u_commit_g), .commit_ready(g_commit_ready), .commit_fire(g_fire),
    .count_before(cnt_before), .count_after(cnt_after), .hint_dis,
    .fp_valid, .fp_pkt, .fp_ready, .fp_stall,
    .q_push_valid(push_valid), .q_push_pkt(push_pkt), .q_push_ready(push_ready),
    .resync(rs_flush), .resync_count(anim_count));

  cache_fingerprint_unit #(.ENTRIES(FP_ENTRIES), .INTERVAL(INTERVAL), .COMMIT_W(U_COMMIT_W)) u_fpu (
    .clk, .rst_n, .flush(rs_flush), .commit(u_commit_g), .commit_fire(g_fire),
    .count_before(cnt_before), .count_after(cnt_after),
    .pkt_valid(fp_valid), .pkt(fp_pkt), .pkt_ready(fp_ready), .stall_commit(fp_stall));

  undead_mem_filter #(.IDW(3), .AW(VA_W-BLK_OFF), .LINE_W(LINE_W)) u_memf (
    .clk, .rst_n, .wb_valid(u_wb_valid), .wb_addr(u_wb_addr), .wb_data(u_wb_data), .wb_dropped,
    .fill_req_valid(u_fill_req_valid), .fill_req_addr(u_fill_req_addr), .fill_req_id(u_fill_req_id),
    .fill_req_ready(u_fill_req_ready), .l2_req_valid, .l2_req_addr, .l2_req_id, .l2_req_ready,
    .l2_resp_valid, .l2_resp_id, .l2_resp_hit, .l2_resp_data, .mem_resp_valid, .mem_resp_id,
    .fill_resp_valid(u_fill_resp_valid), .fill_resp_id(u_fill_resp_id),
    .fill_resp_data(u_fill_resp_data), .fill_resp_zero(), .mem_dropped);

  // ---------------- link ----------------
  nm_comm_queue #(.DEPTH(QDEPTH), .QDELAY(QDELAY)) u_queue (
    .clk, .rst_n, .flush(rs_flush), .push_valid, .push_ready, .push_pkt,
    .pop_valid, .pop_ready, .pop_pkt, .count(q_count));

  // ---------------- animator side ----------------
  logic [AGE_W-1:0] a_cnt_q, a_cnt_n;
  logic             a_iend, s_valid_q;
  logic [AGE_W-1:0] s_age_q;
  logic [A_COMMIT_W-1:0]            ad_v, ai_v;
  logic [A_COMMIT_W-1:0][PAY_W-1:0] ad_a, ai_a;
  logic [FP_ENTRIES-1:0][FP_CNT_W-1:0] s_d, s_i;

  always_comb begin
    a_cnt_n = a_cnt_q;
    for (int i = 0; i < A_COMMIT_W; i++) begin
      ad_v[i] = a_commit[i].valid && a_commit[i].is_mem;
      ai_v[i] = a_commit[i].valid;
      ad_a[i] = blk_addr(a_commit[i].addr);
      ai_a[i] = blk_addr(a_commit[i].pc);
      if (a_commit[i].valid) a_cnt_n = a_cnt_n + 1'b1;
    end
    a_iend = (a_cnt_q[AGE_W-1:LOG_I] != a_cnt_n[AGE_W-1:LOG_I]);
  end
  assign anim_count = a_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_cnt_q   <= '0;
      s_valid_q <= 1'b0;
      s_age_q   <= '0;
    end else begin
      a_cnt_q   <= a_cnt_n;
      s_valid_q <= a_iend;
      if (a_iend) s_age_q <= {a_cnt_n[AGE_W-1:LOG_I], {LOG_I{1'b0}}};
    end
  end

  cache_fingerprint_table #(.ENTRIES(FP_ENTRIES), .NIN(A_COMMIT_W), .CNT_W(FP_CNT_W), .W(PAY_W)) u_a_dtab (
    .clk, .rst_n, .clear(1'b0), .inc_valid(ad_v), .inc_addr(ad_a), .snap(a_iend), .snap_cnt(s_d));
  cache_fingerprint_table #(.ENTRIES(FP_ENTRIES), .NIN(A_COMMIT_W), .CNT_W(FP_CNT_W), .W(PAY_W)) u_a_itab (
    .clk, .rst_n, .clear(1'b0), .inc_valid(ai_v), .inc_addr(ai_a), .snap(a_iend), .snap_cnt(s_i));

  logic              dpf_v, dpf_r, bph_v, bph_t, dfp_v, dfp_i, dfp_r;
  logic [PAY_W-1:0]  dpf_a;
  logic [PAY_W-2:0]  bph_i;
  logic [7:0]        dfp_idx;
  logic [23:0]       dfp_cnt;
  logic [AGE_W-1:0]  dfp_age;

  hint_distribution_unit u_dist (
    .clk, .rst_n, .flush(rs_flush), .q_pop_valid(pop_valid), .q_pop_pkt(pop_pkt), .q_pop_ready(pop_ready),
    .anim_count(a_cnt_q), .dpf_valid(dpf_v), .dpf_addr(dpf_a), .dpf_ready(dpf_r),
    .ipf_valid(a_ipf_valid), .ipf_addr(a_ipf_addr), .ipf_ready(a_ipf_ready),
    .bph_valid(bph_v), .bph_idx(bph_i), .bph_taken(bph_t),
    .fp_valid(dfp_v), .fp_is_i(dfp_i), .fp_idx(dfp_idx), .fp_cnt(dfp_cnt), .fp_age(dfp_age),
    .fp_ready(dfp_r));

  dcache_hint_arbiter #(.PORTS(2), .W(PAY_W)) u_darb (
    .core_busy(a_dc_busy), .hint_valid(dpf_v), .hint_addr(dpf_a), .hint_ready(dpf_r),
    .port_pf_valid(a_dpf_valid), .port_pf_addr(a_dpf_addr));

  logic ev_v, ev_nm, ev_or;
  nm_branch_predictor #(.BHT(BHT), .CHOOSER(BHT)) u_bp (
    .clk, .rst_n, .bp_dis(hint_dis[HK_BP]), .hint_valid(bph_v), .hint_idx(bph_i), .hint_taken(bph_t),
    .pred_pc(a_bp_pred_pc), .pred_taken(a_bp_pred_taken), .pred_use_nm(bp_use_nm),
    .res_valid(a_bp_res_valid), .res_pc(a_bp_res_pc), .res_taken(a_bp_res_taken),
    .ev_valid(ev_v), .ev_nm_correct(ev_nm), .ev_orig_correct(ev_or));

  logic [2:0] dis_event;
  hint_disabling_unit #(.ENTRIES(FP_ENTRIES), .CNT_W(FP_CNT_W), .BACKOFF(BACKOFF)) u_hdis (
    .clk, .rst_n, .clear(rs_done),
    .fp_valid(dfp_v), .fp_is_i(dfp_i), .fp_idx(dfp_idx), .fp_cnt(dfp_cnt), .fp_age(dfp_age),
    .fp_ready(dfp_r), .s_valid(s_valid_q), .s_age(s_age_q), .s_d, .s_i,
    .ev_valid(ev_v), .ev_nm_correct(ev_nm), .ev_orig_correct(ev_or),
    .anim_count(a_cnt_q), .hint_dis, .dis_event);

  resync_controller #(.NREG(NREG), .MIN_DISABLED(1), .XLEN(64)) u_rs (
    .clk, .rst_n, .dis_event, .hint_dis, .force_resync, .busy(), .anim_hold(a_hold),
    .undead_hold(u_hold), .squash(rs_squash), .arf_rd_idx(a_arf_rd_idx), .arf_rd_data(a_arf_rd_data),
    .arf_wr_en(u_arf_wr_en), .arf_wr_idx(u_arf_wr_idx), .arf_wr_data(u_arf_wr_data),
    .anim_pc(a_pc), .pc_wr_en(u_pc_wr_en), .pc_wr(u_pc_wr), .done(rs_done), .resyncs);

  // The animator must not commit while it is held for a state copy.
  a_hold_respected: assert property (@(posedge clk) disable iff (!rst_n)
    a_hold |-> !(|{a_commit[0].valid, a_commit[A_COMMIT_W-1].valid}));

endmodule

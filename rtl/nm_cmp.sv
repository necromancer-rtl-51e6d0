// nm_cmp: chip multiprocessor built from NM clusters (top level).
//
// NCLUSTERS (4) independent nm_cluster instances, each with 4 baseline cores
// and its own animator core, form a 16-core CMP. The 4-core cluster is the
// building block: one animator per cluster keeps the coupling wires local
// instead of running them across the die. Each cluster has its own
// configuration (dead_valid, dead_sel, anim_ok), so up to one dead core per
// cluster can be animated. Every port of nm_cluster appears here as an array
// indexed by cluster; the cores, caches and shared L2 are outside.
module nm_cmp
  import nm_pkg::*;
#(
  parameter int unsigned NCLUSTERS  = 4,
  parameter int unsigned NCORES     = 4,
  parameter int unsigned U_COMMIT_W = 6,
  parameter int unsigned A_COMMIT_W = 2,
  parameter int unsigned QDEPTH     = 32,
  parameter int unsigned INTERVAL   = 1024,
  parameter int unsigned BACKOFF    = 4096,
  parameter int unsigned NREG       = 64,
  parameter int unsigned LINE_W     = 512
) (
  input  logic                                                  clk,
  input  logic                                                  rst_n,
  input  logic [NCLUSTERS-1:0]                                  dead_valid,
  input  logic [NCLUSTERS-1:0][$clog2(NCORES)-1:0]              dead_sel,
  input  logic [NCLUSTERS-1:0]                                  anim_ok,
  input  logic [NCLUSTERS-1:0]                                  force_resync,
  input  commit_t [NCLUSTERS-1:0][NCORES-1:0][U_COMMIT_W-1:0]   c_commit,
  output logic [NCLUSTERS-1:0][NCORES-1:0]                      c_commit_ready,
  output logic [NCLUSTERS-1:0][NCORES-1:0]                      c_squash,
  output logic [NCLUSTERS-1:0][NCORES-1:0]                      c_arf_wr_en,
  output logic [NCLUSTERS-1:0][$clog2(NREG)-1:0]                arf_wr_idx,
  output logic [NCLUSTERS-1:0][63:0]                            arf_wr_data,
  output logic [NCLUSTERS-1:0][NCORES-1:0]                      c_pc_wr_en,
  output logic [NCLUSTERS-1:0][VA_W-1:0]                        pc_wr,
  input  logic [NCLUSTERS-1:0]                                  u_wb_valid,
  input  logic [NCLUSTERS-1:0][VA_W-BLK_OFF-1:0]                u_wb_addr,
  input  logic [NCLUSTERS-1:0][LINE_W-1:0]                      u_wb_data,
  input  logic [NCLUSTERS-1:0]                                  u_fill_req_valid,
  input  logic [NCLUSTERS-1:0][VA_W-BLK_OFF-1:0]                u_fill_req_addr,
  input  logic [NCLUSTERS-1:0][2:0]                             u_fill_req_id,
  output logic [NCLUSTERS-1:0]                                  u_fill_req_ready,
  output logic [NCLUSTERS-1:0]                                  u_fill_resp_valid,
  output logic [NCLUSTERS-1:0][2:0]                             u_fill_resp_id,
  output logic [NCLUSTERS-1:0][LINE_W-1:0]                      u_fill_resp_data,
  output logic [NCLUSTERS-1:0]                                  l2_req_valid,
  output logic [NCLUSTERS-1:0][VA_W-BLK_OFF-1:0]                l2_req_addr,
  output logic [NCLUSTERS-1:0][2:0]                             l2_req_id,
  input  logic [NCLUSTERS-1:0]                                  l2_req_ready,
  input  logic [NCLUSTERS-1:0]                                  l2_resp_valid,
  input  logic [NCLUSTERS-1:0][2:0]                             l2_resp_id,
  input  logic [NCLUSTERS-1:0]                                  l2_resp_hit,
  input  logic [NCLUSTERS-1:0][LINE_W-1:0]                      l2_resp_data,
  input  logic [NCLUSTERS-1:0]                                  mem_resp_valid,
  input  logic [NCLUSTERS-1:0][2:0]                             mem_resp_id,
  input  commit_t [NCLUSTERS-1:0][A_COMMIT_W-1:0]               a_commit,
  output logic [NCLUSTERS-1:0]                                  a_hold,
  input  logic [NCLUSTERS-1:0][1:0]                             a_dc_busy,
  output logic [NCLUSTERS-1:0][1:0]                             a_dpf_valid,
  output logic [NCLUSTERS-1:0][PAY_W-1:0]                       a_dpf_addr,
  output logic [NCLUSTERS-1:0]                                  a_ipf_valid,
  output logic [NCLUSTERS-1:0][PAY_W-1:0]                       a_ipf_addr,
  input  logic [NCLUSTERS-1:0]                                  a_ipf_ready,
  input  logic [NCLUSTERS-1:0][VA_W-1:0]                        a_bp_pred_pc,
  output logic [NCLUSTERS-1:0]                                  a_bp_pred_taken,
  input  logic [NCLUSTERS-1:0]                                  a_bp_res_valid,
  input  logic [NCLUSTERS-1:0][VA_W-1:0]                        a_bp_res_pc,
  input  logic [NCLUSTERS-1:0]                                  a_bp_res_taken,
  output logic [NCLUSTERS-1:0][$clog2(NREG)-1:0]                a_arf_rd_idx,
  input  logic [NCLUSTERS-1:0][63:0]                            a_arf_rd_data,
  input  logic [NCLUSTERS-1:0][VA_W-1:0]                        a_pc,
  output logic [NCLUSTERS-1:0]                                  coupled,
  output logic [NCLUSTERS-1:0][2:0]                             hint_dis,
  output logic [NCLUSTERS-1:0][AGE_W-1:0]                       anim_count,
  output logic [NCLUSTERS-1:0][AGE_W-1:0]                       undead_count,
  output logic [NCLUSTERS-1:0][31:0]                            resyncs,
  output logic [NCLUSTERS-1:0][$clog2(QDEPTH+1)-1:0]            q_count
);
  for (genvar k = 0; k < NCLUSTERS; k++) begin : g_cl
    nm_cluster #(.NCORES(NCORES), .U_COMMIT_W(U_COMMIT_W), .A_COMMIT_W(A_COMMIT_W),
                 .QDEPTH(QDEPTH), .INTERVAL(INTERVAL), .BACKOFF(BACKOFF), .NREG(NREG),
                 .LINE_W(LINE_W)) u_cl (
      .clk, .rst_n,
      .dead_valid(dead_valid[k]), .dead_sel(dead_sel[k]), .anim_ok(anim_ok[k]),
      .force_resync(force_resync[k]),
      .c_commit(c_commit[k]), .c_commit_ready(c_commit_ready[k]), .c_squash(c_squash[k]),
      .c_arf_wr_en(c_arf_wr_en[k]), .arf_wr_idx(arf_wr_idx[k]), .arf_wr_data(arf_wr_data[k]),
      .c_pc_wr_en(c_pc_wr_en[k]), .pc_wr(pc_wr[k]),
      .u_wb_valid(u_wb_valid[k]), .u_wb_addr(u_wb_addr[k]), .u_wb_data(u_wb_data[k]),
      .u_fill_req_valid(u_fill_req_valid[k]), .u_fill_req_addr(u_fill_req_addr[k]),
      .u_fill_req_id(u_fill_req_id[k]), .u_fill_req_ready(u_fill_req_ready[k]),
      .u_fill_resp_valid(u_fill_resp_valid[k]), .u_fill_resp_id(u_fill_resp_id[k]),
      .u_fill_resp_data(u_fill_resp_data[k]),
      .l2_req_valid(l2_req_valid[k]), .l2_req_addr(l2_req_addr[k]), .l2_req_id(l2_req_id[k]),
      .l2_req_ready(l2_req_ready[k]), .l2_resp_valid(l2_resp_valid[k]), .l2_resp_id(l2_resp_id[k]),
      .l2_resp_hit(l2_resp_hit[k]), .l2_resp_data(l2_resp_data[k]),
      .mem_resp_valid(mem_resp_valid[k]), .mem_resp_id(mem_resp_id[k]),
      .a_commit(a_commit[k]), .a_hold(a_hold[k]), .a_dc_busy(a_dc_busy[k]),
      .a_dpf_valid(a_dpf_valid[k]), .a_dpf_addr(a_dpf_addr[k]),
      .a_ipf_valid(a_ipf_valid[k]), .a_ipf_addr(a_ipf_addr[k]), .a_ipf_ready(a_ipf_ready[k]),
      .a_bp_pred_pc(a_bp_pred_pc[k]), .a_bp_pred_taken(a_bp_pred_taken[k]),
      .a_bp_res_valid(a_bp_res_valid[k]), .a_bp_res_pc(a_bp_res_pc[k]),
      .a_bp_res_taken(a_bp_res_taken[k]), .a_arf_rd_idx(a_arf_rd_idx[k]),
      .a_arf_rd_data(a_arf_rd_data[k]), .a_pc(a_pc[k]),
      .coupled(coupled[k]), .hint_dis(hint_dis[k]), .anim_count(anim_count[k]),
      .undead_count(undead_count[k]), .resyncs(resyncs[k]), .q_count(q_count[k]));
  end

endmodule

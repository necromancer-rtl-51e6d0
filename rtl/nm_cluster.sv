// nm_cluster: four baseline cores sharing one animator core.
//
// A cluster has NCORES (4) baseline cores and one animator core with its NM
// logic (nm_coupling). After manufacturing test, `dead_sel` names the one core
// of the cluster that is defective and `dead_valid` says there is one; if
// `anim_ok` is low (the animator or its NM logic is itself defective) the
// animator stays off. With a dead core and a working animator, the dead
// core's commit stream is steered to the coupling logic and it becomes the
// undead core: its commit may be stalled by the hint queue and it receives
// the resynchronization writes. The other cores run normally; their
// commit_ready is always high and they never see a resynchronization.
// The register/PC copy uses one shared bus (arf_wr_idx/data, pc_wr) with a
// per-core enable. The undead core's L1-L2 path (u_wb_*, u_fill_*, l2_*,
// mem_resp_*) is the one of the selected core; steering it is left to the
// cache interconnect. Selecting the dead core by configuration inputs is
// this implementation's choice.
module nm_cluster
  import nm_pkg::*;
#(
  parameter int unsigned NCORES     = 4,
  parameter int unsigned U_COMMIT_W = 6,
  parameter int unsigned A_COMMIT_W = 2,
  parameter int unsigned QDEPTH     = 32,
  parameter int unsigned INTERVAL   = 1024,
  parameter int unsigned BACKOFF    = 4096,
  parameter int unsigned NREG       = 64,
  parameter int unsigned LINE_W     = 512
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  dead_valid,
  input  logic [$clog2(NCORES)-1:0]             dead_sel,
  input  logic                                  anim_ok,
  input  logic                                  force_resync,
  // baseline cores
  input  commit_t [NCORES-1:0][U_COMMIT_W-1:0]  c_commit,
  output logic [NCORES-1:0]                     c_commit_ready,
  output logic [NCORES-1:0]                     c_squash,
  output logic [NCORES-1:0]                     c_arf_wr_en,
  output logic [$clog2(NREG)-1:0]               arf_wr_idx,
  output logic [63:0]                           arf_wr_data,
  output logic [NCORES-1:0]                     c_pc_wr_en,
  output logic [VA_W-1:0]                       pc_wr,
  // undead core L1 <-> L2
  input  logic                                  u_wb_valid,
  input  logic [VA_W-BLK_OFF-1:0]               u_wb_addr,
  input  logic [LINE_W-1:0]                     u_wb_data,
  input  logic                                  u_fill_req_valid,
  input  logic [VA_W-BLK_OFF-1:0]               u_fill_req_addr,
  input  logic [2:0]                            u_fill_req_id,
  output logic                                  u_fill_req_ready,
  output logic                                  u_fill_resp_valid,
  output logic [2:0]                            u_fill_resp_id,
  output logic [LINE_W-1:0]                     u_fill_resp_data,
  output logic                                  l2_req_valid,
  output logic [VA_W-BLK_OFF-1:0]               l2_req_addr,
  output logic [2:0]                            l2_req_id,
  input  logic                                  l2_req_ready,
  input  logic                                  l2_resp_valid,
  input  logic [2:0]                            l2_resp_id,
  input  logic                                  l2_resp_hit,
  input  logic [LINE_W-1:0]                     l2_resp_data,
  input  logic                                  mem_resp_valid,
  input  logic [2:0]                            mem_resp_id,
  // animator core
  input  commit_t [A_COMMIT_W-1:0]              a_commit,
  output logic                                  a_hold,
  input  logic [1:0]                            a_dc_busy,
  output logic [1:0]                            a_dpf_valid,
  output logic [PAY_W-1:0]                      a_dpf_addr,
  output logic                                  a_ipf_valid,
  output logic [PAY_W-1:0]                      a_ipf_addr,
  input  logic                                  a_ipf_ready,
  input  logic [VA_W-1:0]                       a_bp_pred_pc,
  output logic                                  a_bp_pred_taken,
  input  logic                                  a_bp_res_valid,
  input  logic [VA_W-1:0]                       a_bp_res_pc,
  input  logic                                  a_bp_res_taken,
  output logic [$clog2(NREG)-1:0]               a_arf_rd_idx,
  input  logic [63:0]                           a_arf_rd_data,
  input  logic [VA_W-1:0]                       a_pc,
  // status
  output logic                                  coupled,
  output logic [2:0]                            hint_dis,
  output logic [AGE_W-1:0]                      anim_count,
  output logic [AGE_W-1:0]                      undead_count,
  output logic [31:0]                           resyncs,
  output logic [$clog2(QDEPTH+1)-1:0]           q_count
);
  commit_t [U_COMMIT_W-1:0] u_commit;
  commit_t [A_COMMIT_W-1:0] a_commit_g;
  logic                     u_ready, u_squash, u_arf_en, u_pc_en;

  assign coupled = dead_valid && anim_ok;

  always_comb begin
    u_commit   = '0;
    a_commit_g = '0;
    if (coupled) begin
      u_commit   = c_commit[dead_sel];
      a_commit_g = a_commit;
    end
    for (int c = 0; c < NCORES; c++) begin
      logic me;
      me = coupled && (dead_sel == c[$clog2(NCORES)-1:0]);
      c_commit_ready[c] = me ? u_ready : 1'b1;
      c_squash[c]       = me && u_squash;
      c_arf_wr_en[c]    = me && u_arf_en;
      c_pc_wr_en[c]     = me && u_pc_en;
    end
  end

  nm_coupling #(.U_COMMIT_W(U_COMMIT_W), .A_COMMIT_W(A_COMMIT_W), .QDEPTH(QDEPTH),
                .INTERVAL(INTERVAL), .BACKOFF(BACKOFF), .NREG(NREG), .LINE_W(LINE_W)) u_nm (
    .clk, .rst_n, .force_resync(force_resync && coupled),
    .u_commit, .u_commit_ready(u_ready), .u_squash, .u_arf_wr_en(u_arf_en),
    .u_arf_wr_idx(arf_wr_idx), .u_arf_wr_data(arf_wr_data), .u_pc_wr_en(u_pc_en), .u_pc_wr(pc_wr),
    .u_wb_valid, .u_wb_addr, .u_wb_data, .u_fill_req_valid, .u_fill_req_addr, .u_fill_req_id,
    .u_fill_req_ready, .u_fill_resp_valid, .u_fill_resp_id, .u_fill_resp_data,
    .l2_req_valid, .l2_req_addr, .l2_req_id, .l2_req_ready, .l2_resp_valid, .l2_resp_id,
    .l2_resp_hit, .l2_resp_data, .mem_resp_valid, .mem_resp_id,
    .a_commit(a_commit_g), .a_hold, .a_dc_busy, .a_dpf_valid, .a_dpf_addr, .a_ipf_valid, .a_ipf_addr,
    .a_ipf_ready, .a_bp_pred_pc, .a_bp_pred_taken, .a_bp_res_valid(a_bp_res_valid && coupled),
    .a_bp_res_pc, .a_bp_res_taken, .a_arf_rd_idx, .a_arf_rd_data, .a_pc,
    .hint_dis, .anim_count, .undead_count, .resyncs, .q_count, .bp_use_nm(), .wb_dropped(),
    .mem_dropped());

endmodule

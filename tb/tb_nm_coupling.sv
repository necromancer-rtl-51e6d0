// tb_nm_coupling: one coupled pair at its default parameters driven by the
// behavioural core model (nm_pair_model). The undead core is healthy for the
// first 20000 committed instructions, then carries a hard fault that scatters
// its data accesses into one set. The run must show hints flowing (D and I
// prefetches, NM predictor use), the undead core stalling on a full queue,
// D-cache hints being disabled after the fault, resynchronizations with
// correct register copies, back-off periods ending, and the undead memory
// filter dropping write-backs and zero-filling L2 misses.
module tb_nm_coupling;
  import nm_pkg::*;
  localparam int CYCLES = 40000;
  logic clk = 0, rst_n = 0, run = 0;
  commit_t [5:0] u_commit;
  commit_t [1:0] a_commit;
  logic u_commit_ready, u_squash, u_arf_wr_en, u_pc_wr_en, u_wb_valid, u_fill_req_valid, u_fill_req_ready;
  logic u_fill_resp_valid, l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_hit, mem_resp_valid;
  logic [5:0] u_arf_wr_idx, a_arf_rd_idx;
  logic [63:0] u_arf_wr_data, a_arf_rd_data;
  logic [VA_W-1:0] u_pc_wr, a_bp_pred_pc, a_bp_res_pc, a_pc;
  logic [VA_W-BLK_OFF-1:0] u_wb_addr, u_fill_req_addr, l2_req_addr;
  logic [511:0] u_wb_data, u_fill_resp_data, l2_resp_data;
  logic [2:0] u_fill_req_id, u_fill_resp_id, l2_req_id, l2_resp_id, mem_resp_id, hint_dis;
  logic a_hold, a_ipf_valid, a_ipf_ready, a_bp_pred_taken, a_bp_res_valid, a_bp_res_taken, bp_use_nm;
  logic [1:0] a_dc_busy, a_dpf_valid;
  logic [PAY_W-1:0] a_dpf_addr, a_ipf_addr;
  logic [AGE_W-1:0] anim_count, undead_count;
  logic [31:0] resyncs, wb_dropped, mem_dropped;
  logic [5:0] q_count;
  int checks = 0, failures = 0, n_nm_used = 0;
  int m_checks, m_fails, n_dpf, n_ipf, n_bpc, n_br, n_ustall, n_qfull, n_dis, n_boend, n_rs, n_wb, n_zf, a_n, u_n;

  nm_coupling dut (.*, .force_resync(1'b0));

  nm_pair_model #(.SEED(7), .FAULT_AT(20000), .QDEPTH(32)) cores (
    .clk, .rst_n, .run, .u_commit, .u_commit_ready, .u_squash, .u_arf_wr_en, .u_arf_wr_idx,
    .u_arf_wr_data, .u_pc_wr_en, .u_pc_wr, .u_wb_valid, .u_wb_addr, .u_wb_data, .u_fill_req_valid,
    .u_fill_req_addr, .u_fill_req_id, .u_fill_resp_valid, .u_fill_resp_id, .u_fill_resp_data,
    .l2_req_valid, .l2_req_id, .l2_req_ready, .l2_resp_valid, .l2_resp_id, .l2_resp_hit, .l2_resp_data,
    .mem_resp_valid, .mem_resp_id, .a_commit, .a_hold, .a_dc_busy, .a_dpf_valid, .a_dpf_addr,
    .a_ipf_valid, .a_ipf_addr, .a_ipf_ready, .a_bp_pred_pc, .a_bp_pred_taken, .a_bp_res_valid,
    .a_bp_res_pc, .a_bp_res_taken, .a_arf_rd_idx, .a_arf_rd_data, .a_pc, .hint_dis, .resyncs, .q_count,
    .checks(m_checks), .fails(m_fails), .n_dpf, .n_ipf, .n_bp_correct(n_bpc), .n_branches(n_br),
    .n_ustall, .n_qfull, .n_disable(n_dis), .n_backoff_end(n_boend), .n_resync(n_rs),
    .n_wb_drop(n_wb), .n_zero_fill(n_zf), .a_n, .u_n);

  always #5 clk = ~clk;
  always @(posedge clk) if (bp_use_nm && a_bp_res_valid) n_nm_used++;

  initial begin
    repeat (CYCLES + 5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("  -> never happened: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; run = 1;
    repeat (CYCLES) @(posedge clk);
    #1 run = 0;
    @(posedge clk);
    checks += m_checks; failures += m_fails;
    checks++;
    if (int'(anim_count) != a_n) begin failures++; $display("animator count %0d model %0d", anim_count, a_n); end
    $display("animator committed %0d, branch accuracy %0d/%0d", a_n, n_bpc, n_br);
    need(n_dpf, "D-cache prefetches");
    need(n_ipf, "I-cache prefetches");
    need(n_nm_used, "branches predicted by NM BP");
    need(n_ustall, "undead stall cycles");
    need(n_qfull, "queue-full cycles");
    need(n_dis, "hint disables");
    need(n_rs, "resynchronizations");
    need(n_boend, "back-off periods ended");
    need(n_wb, "write-backs dropped");
    need(n_zf, "L2 misses zero-filled");
    need(int'(mem_dropped), "memory replies dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nm_cluster: one 4-core cluster with its animator (nm_cluster, default
// parameters), driven by the behavioural core model (nm_pair_model) for the
// dead core, the animator and the L2 path; the three live cores send random
// commit groups.
//
// Phase 1 (25000 cycles): dead core 2 is animated; its hard fault starts after
// 8000 instructions. Checked: the live cores are never stalled, squashed or
// written; the model's hint and copy checks; D prefetches, resyncs and
// undead stalls must occur.
// Phase 2 (after a reset, 3000 cycles): dead_valid = 0, then anim_ok = 0.
// The cluster must stay uncoupled with no hints, no queue use, no hold, and
// every core must commit freely.
// The phases and counts are this testbench's own choices.
module tb_nm_cluster;
  import nm_pkg::*;
  localparam int SEL = 2;
  logic clk = 0, rst_n = 0, run = 0;
  logic dead_valid, anim_ok, force_resync;
  logic [1:0] dead_sel;
  commit_t [3:0][5:0] c_commit, live;
  commit_t [5:0] u_commit;
  commit_t [1:0] a_commit;
  logic [3:0] c_commit_ready, c_squash, c_arf_wr_en, c_pc_wr_en;
  logic [5:0] arf_wr_idx, a_arf_rd_idx, q_count;
  logic [63:0] arf_wr_data, a_arf_rd_data;
  logic [VA_W-1:0] pc_wr, a_bp_pred_pc, a_bp_res_pc, a_pc;
  logic u_wb_valid, u_fill_req_valid, u_fill_req_ready, u_fill_resp_valid;
  logic l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_hit, mem_resp_valid;
  logic [VA_W-BLK_OFF-1:0] u_wb_addr, u_fill_req_addr, l2_req_addr;
  logic [511:0] u_wb_data, u_fill_resp_data, l2_resp_data;
  logic [2:0] u_fill_req_id, u_fill_resp_id, l2_req_id, l2_resp_id, mem_resp_id, hint_dis;
  logic a_hold, a_ipf_valid, a_ipf_ready, a_bp_pred_taken, a_bp_res_valid, a_bp_res_taken, coupled;
  logic [1:0] a_dc_busy, a_dpf_valid;
  logic [PAY_W-1:0] a_dpf_addr, a_ipf_addr;
  logic [AGE_W-1:0] anim_count, undead_count;
  logic [31:0] resyncs;
  int checks = 0, failures = 0, n_uncoupled = 0;
  int m_checks, m_fails, n_dpf, n_ipf, n_bpc, n_br, n_ustall, n_qfull, n_dis, n_boend, n_rs, n_wb, n_zf, a_n, u_n;

  nm_cluster dut (.*);

  assign dead_sel     = 2'(SEL);
  assign force_resync = 1'b0;
  for (genvar j = 0; j < 4; j++) begin : g_c
    assign c_commit[j] = (j == SEL) ? u_commit : live[j];
  end

  always @(negedge clk) begin
    live = '0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 6; i++)
        if ($urandom % 2 == 0) begin
          live[j][i].valid = 1'b1;
          live[j][i].pc    = 64'($urandom);
        end
  end

  nm_pair_model #(.SEED(11), .FAULT_AT(8000), .QDEPTH(32)) cores (
    .clk, .rst_n, .run, .u_commit, .u_commit_ready(c_commit_ready[SEL]), .u_squash(c_squash[SEL]),
    .u_arf_wr_en(c_arf_wr_en[SEL]), .u_arf_wr_idx(arf_wr_idx), .u_arf_wr_data(arf_wr_data),
    .u_pc_wr_en(c_pc_wr_en[SEL]), .u_pc_wr(pc_wr), .u_wb_valid, .u_wb_addr, .u_wb_data,
    .u_fill_req_valid, .u_fill_req_addr, .u_fill_req_id, .u_fill_resp_valid, .u_fill_resp_id,
    .u_fill_resp_data, .l2_req_valid, .l2_req_id, .l2_req_ready, .l2_resp_valid, .l2_resp_id,
    .l2_resp_hit, .l2_resp_data, .mem_resp_valid, .mem_resp_id, .a_commit, .a_hold, .a_dc_busy,
    .a_dpf_valid, .a_dpf_addr, .a_ipf_valid, .a_ipf_addr, .a_ipf_ready, .a_bp_pred_pc,
    .a_bp_pred_taken, .a_bp_res_valid, .a_bp_res_pc, .a_bp_res_taken, .a_arf_rd_idx,
    .a_arf_rd_data, .a_pc, .hint_dis, .resyncs, .q_count,
    .checks(m_checks), .fails(m_fails), .n_dpf, .n_ipf, .n_bp_correct(n_bpc), .n_branches(n_br),
    .n_ustall, .n_qfull, .n_disable(n_dis), .n_backoff_end(n_boend), .n_resync(n_rs),
    .n_wb_drop(n_wb), .n_zero_fill(n_zf), .a_n, .u_n);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    #3;
    if (rst_n && run) begin
      bit on;
      on = dead_valid && anim_ok;
      checks++;
      if (coupled != on) begin failures++; $display("coupled=%b expected %b", coupled, on); end
      for (int j = 0; j < 4; j++) begin
        if (on && j == SEL) continue;
        checks++;
        if (!c_commit_ready[j] || c_squash[j] || c_arf_wr_en[j] || c_pc_wr_en[j]) begin
          failures++; $display("core %0d disturbed", j);
        end
      end
      if (!on) begin
        checks++;
        n_uncoupled++;
        if (a_dpf_valid != 2'b00 || a_ipf_valid || a_hold || q_count != '0 || resyncs != '0) begin
          failures++; $display("uncoupled cluster shows NM activity");
        end
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-30s %0d", what, n);
    if (n == 0) begin failures++; $display("  -> never happened: %s", what); end
  endtask

  initial begin
    dead_valid = 1'b1; anim_ok = 1'b1;
    repeat (3) @(posedge clk); rst_n = 1; run = 1;
    repeat (25000) @(posedge clk);
    #1 run = 0;
    @(posedge clk);
    checks += m_checks; failures += m_fails;
    checks++;
    if (int'(anim_count) != a_n) begin failures++; $display("animator count %0d model %0d", anim_count, a_n); end
    need(n_dpf, "D-cache prefetches");
    need(n_ustall, "undead stall cycles");
    need(n_dis, "hint disables");
    need(n_rs, "resynchronizations");
    // phase 2: no dead core, then a failed animator
    rst_n = 0; dead_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; run = 1;
    repeat (1500) @(posedge clk);
    #1 dead_valid = 1'b1; anim_ok = 1'b0;
    repeat (1500) @(posedge clk);
    #1 run = 0;
    need(n_uncoupled, "uncoupled cycles checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

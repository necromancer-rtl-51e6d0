// tb_nm_cmp: full-size test of the 16-core CMP top (nm_cmp) at its default
// parameters: 4 clusters of 4 six-wide cores, one animator per cluster.
//
// Each cluster gets a behavioural core model (nm_pair_model) for its dead
// core, its animator and its L2 path. The other three cores send random commit
// groups. The clusters are configured differently:
//   cluster 0 : dead core 1 animated, hard fault after 20000 instructions
//   cluster 1 : dead core 3 animated, hard fault after 12000 instructions
//   cluster 2 : no dead core (dead_valid = 0)
//   cluster 3 : dead core 2, but the animator failed test (anim_ok = 0)
// Checked every cycle: live cores are never stalled, squashed or written;
// clusters 2 and 3 stay uncoupled with no hints, no queue use and no hold.
// The core models check hint legality and the register/PC copies.
// Counted mechanisms (each must happen at least once, summed over the
// animated clusters): D and I prefetches, branches predicted by the NM
// predictor, undead stalls, full queue, hint disables, resynchronizations,
// back-off ends, dropped write-backs, zero fills, dropped memory replies, and
// live-core commits next to an animated dead core.
// The stimulus scheme and counts are this testbench's own choices.
module tb_nm_cmp;
  import nm_pkg::*;
  localparam int CYCLES = 40000;
  localparam int NCL = 4;

  logic clk = 0, rst_n = 0, run = 0;
  logic [NCL-1:0]                      dead_valid, anim_ok, force_resync;
  logic [NCL-1:0][1:0]                 dead_sel;
  commit_t [NCL-1:0][3:0][5:0]         c_commit;
  logic [NCL-1:0][3:0]                 c_commit_ready, c_squash, c_arf_wr_en, c_pc_wr_en;
  logic [NCL-1:0][5:0]                 arf_wr_idx, a_arf_rd_idx;
  logic [NCL-1:0][63:0]                arf_wr_data, a_arf_rd_data;
  logic [NCL-1:0][VA_W-1:0]            pc_wr, a_bp_pred_pc, a_bp_res_pc, a_pc;
  logic [NCL-1:0]                      u_wb_valid, u_fill_req_valid, u_fill_req_ready, u_fill_resp_valid;
  logic [NCL-1:0][VA_W-BLK_OFF-1:0]    u_wb_addr, u_fill_req_addr, l2_req_addr;
  logic [NCL-1:0][511:0]               u_wb_data, u_fill_resp_data, l2_resp_data;
  logic [NCL-1:0][2:0]                 u_fill_req_id, u_fill_resp_id, l2_req_id, l2_resp_id, mem_resp_id;
  logic [NCL-1:0]                      l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_hit, mem_resp_valid;
  commit_t [NCL-1:0][1:0]              a_commit;
  logic [NCL-1:0]                      a_hold, a_ipf_valid, a_ipf_ready, a_bp_pred_taken;
  logic [NCL-1:0]                      a_bp_res_valid, a_bp_res_taken, coupled;
  logic [NCL-1:0][1:0]                 a_dc_busy, a_dpf_valid;
  logic [NCL-1:0][PAY_W-1:0]           a_dpf_addr, a_ipf_addr;
  logic [NCL-1:0][2:0]                 hint_dis;
  logic [NCL-1:0][AGE_W-1:0]           anim_count, undead_count;
  logic [NCL-1:0][31:0]                resyncs;
  logic [NCL-1:0][5:0]                 q_count;

  int checks = 0, failures = 0, n_nm_used = 0, n_live = 0;

  nm_cmp dut (.*);

  assign dead_valid   = 4'b1011;
  assign anim_ok      = 4'b0111;
  assign dead_sel     = {2'd2, 2'd0, 2'd3, 2'd1};
  assign force_resync = '0;

  for (genvar k = 0; k < NCL; k++) begin : g
    localparam int SEL = (k == 0) ? 1 : (k == 1) ? 3 : (k == 2) ? 0 : 2;
    commit_t [5:0]      u_commit;
    commit_t [3:0][5:0] live;
    int m_checks, m_fails, n_dpf, n_ipf, n_bpc, n_br, n_ustall, n_qfull, n_dis, n_boend, n_rs, n_wb, n_zf, a_n, u_n;

    for (genvar j = 0; j < 4; j++) begin : g_c
      assign c_commit[k][j] = (j == SEL) ? u_commit : live[j];
    end

    // random commit groups for the live cores
    always @(negedge clk) begin
      live = '0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 6; i++)
          if ($urandom % 2 == 0) begin
            live[j][i].valid = 1'b1;
            live[j][i].pc    = 64'($urandom);
          end
    end

    nm_pair_model #(.SEED(3 + k), .FAULT_AT(k == 1 ? 12000 : 20000), .QDEPTH(32)) cores (
      .clk, .rst_n, .run, .u_commit, .u_commit_ready(c_commit_ready[k][SEL]),
      .u_squash(c_squash[k][SEL]), .u_arf_wr_en(c_arf_wr_en[k][SEL]), .u_arf_wr_idx(arf_wr_idx[k]),
      .u_arf_wr_data(arf_wr_data[k]), .u_pc_wr_en(c_pc_wr_en[k][SEL]), .u_pc_wr(pc_wr[k]),
      .u_wb_valid(u_wb_valid[k]), .u_wb_addr(u_wb_addr[k]), .u_wb_data(u_wb_data[k]),
      .u_fill_req_valid(u_fill_req_valid[k]), .u_fill_req_addr(u_fill_req_addr[k]),
      .u_fill_req_id(u_fill_req_id[k]), .u_fill_resp_valid(u_fill_resp_valid[k]),
      .u_fill_resp_id(u_fill_resp_id[k]), .u_fill_resp_data(u_fill_resp_data[k]),
      .l2_req_valid(l2_req_valid[k]), .l2_req_id(l2_req_id[k]), .l2_req_ready(l2_req_ready[k]),
      .l2_resp_valid(l2_resp_valid[k]), .l2_resp_id(l2_resp_id[k]), .l2_resp_hit(l2_resp_hit[k]),
      .l2_resp_data(l2_resp_data[k]), .mem_resp_valid(mem_resp_valid[k]), .mem_resp_id(mem_resp_id[k]),
      .a_commit(a_commit[k]), .a_hold(a_hold[k]), .a_dc_busy(a_dc_busy[k]),
      .a_dpf_valid(a_dpf_valid[k]), .a_dpf_addr(a_dpf_addr[k]), .a_ipf_valid(a_ipf_valid[k]),
      .a_ipf_addr(a_ipf_addr[k]), .a_ipf_ready(a_ipf_ready[k]), .a_bp_pred_pc(a_bp_pred_pc[k]),
      .a_bp_pred_taken(a_bp_pred_taken[k]), .a_bp_res_valid(a_bp_res_valid[k]),
      .a_bp_res_pc(a_bp_res_pc[k]), .a_bp_res_taken(a_bp_res_taken[k]),
      .a_arf_rd_idx(a_arf_rd_idx[k]), .a_arf_rd_data(a_arf_rd_data[k]), .a_pc(a_pc[k]),
      .hint_dis(hint_dis[k]), .resyncs(resyncs[k]), .q_count(q_count[k]),
      .checks(m_checks), .fails(m_fails), .n_dpf, .n_ipf, .n_bp_correct(n_bpc), .n_branches(n_br),
      .n_ustall, .n_qfull, .n_disable(n_dis), .n_backoff_end(n_boend), .n_resync(n_rs),
      .n_wb_drop(n_wb), .n_zero_fill(n_zf), .a_n, .u_n);

    // per-cycle structural checks, sampled before the rising edge
    always @(negedge clk) begin
      #3;
      if (rst_n && run) begin
        bit on;
        on = dead_valid[k] && anim_ok[k];
        checks++;
        if (coupled[k] != on) begin failures++; $display("cluster %0d coupled=%b", k, coupled[k]); end
        for (int j = 0; j < 4; j++) begin
          if (on && j == SEL) continue;
          checks++;
          if (!c_commit_ready[k][j] || c_squash[k][j] || c_arf_wr_en[k][j] || c_pc_wr_en[k][j]) begin
            failures++; $display("cluster %0d live core %0d disturbed", k, j);
          end
          if (on && c_commit[k][j][0].valid) n_live++;
        end
        if (!on) begin
          checks++;
          if (a_dpf_valid[k] != 2'b00 || a_ipf_valid[k] || a_hold[k] || q_count[k] != '0 || resyncs[k] != '0) begin
            failures++; $display("cluster %0d is not animated but shows NM activity", k);
          end
        end
      end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dut.g_cl[0].u_cl.u_nm.bp_use_nm && a_bp_res_valid[0]) n_nm_used++;
    if (dut.g_cl[1].u_cl.u_nm.bp_use_nm && a_bp_res_valid[1]) n_nm_used++;
  end

  initial begin
    repeat (CYCLES + 5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin failures++; $display("  -> never happened: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; run = 1;
    repeat (CYCLES) @(posedge clk);
    #1 run = 0;
    @(posedge clk);
    checks += g[0].m_checks + g[1].m_checks + g[2].m_checks + g[3].m_checks;
    failures += g[0].m_fails + g[1].m_fails + g[2].m_fails + g[3].m_fails;
    checks++;
    if (int'(anim_count[0]) != g[0].a_n || int'(anim_count[1]) != g[1].a_n) begin
      failures++; $display("animator count mismatch %0d %0d %0d %0d", anim_count[0], g[0].a_n, anim_count[1], g[1].a_n);
    end
    checks++;
    if (anim_count[2] != '0 || anim_count[3] != '0) begin failures++; $display("uncoupled cluster counted"); end
    $display("cluster 0: animator %0d instr, branch accuracy %0d/%0d", g[0].a_n, g[0].n_bpc, g[0].n_br);
    $display("cluster 1: animator %0d instr, branch accuracy %0d/%0d", g[1].a_n, g[1].n_bpc, g[1].n_br);
    need(g[0].n_dpf + g[1].n_dpf, "D-cache prefetches");
    need(g[0].n_ipf + g[1].n_ipf, "I-cache prefetches");
    need(n_nm_used, "branches predicted by NM BP");
    need(g[0].n_ustall + g[1].n_ustall, "undead stall cycles");
    need(g[0].n_qfull + g[1].n_qfull, "queue-full cycles");
    need(g[0].n_dis + g[1].n_dis, "hint disables");
    need(g[0].n_rs + g[1].n_rs, "resynchronizations");
    need(g[0].n_boend + g[1].n_boend, "back-off periods ended");
    need(int'(dut.g_cl[0].u_cl.u_nm.wb_dropped + dut.g_cl[1].u_cl.u_nm.wb_dropped), "write-backs dropped");
    need(g[0].n_zf + g[1].n_zf, "L2 misses zero-filled");
    need(int'(dut.g_cl[0].u_cl.u_nm.mem_dropped + dut.g_cl[1].u_cl.u_nm.mem_dropped), "memory replies dropped");
    need(n_live, "live-core commits beside an undead core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

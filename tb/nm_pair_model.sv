// nm_pair_model: behavioural stand-in for the two cores of a coupled pair and
// the L2 path of the undead core, for system testbenches. Not synthesizable.
//
// Both cores run the same synthetic program: instruction n has
//   PC      0x20000 + 4*(n mod 600) (+0x10000 per 6000-instruction phase)
//   memory  every third instruction, data block (5*(n/3)) mod 4096
//   branch  every eighth instruction, taken unless (n/8) mod 4 == 0
// The undead core commits 3-6 instructions per cycle when allowed; from its
// FAULT_AT-th committed instruction on, a modelled hard fault sends all its
// data addresses to one cache set, so its access pattern no longer matches.
// The animator commits 0-2 per cycle (never while held). Its D-cache ports
// are busy at random; branches are predicted and then resolved in order.
// On a resynchronization the undead core takes the copied registers, checks
// each value, and restarts from the animator's instruction.
//
// Checks (counted in `checks`/`fails`): no D prefetch on a busy port, every
// D prefetch is a block the program touches no later than 16 instructions
// ahead of the animator (the D release window), copied register values and
// PC are the animator's, the L2-miss reply to the undead core is zero.
// Mechanism counters: D/I prefetches, branch hints used, undead stall
// cycles, queue-full cycles, disables, back-off ends, resyncs, dropped
// write-backs, zero fills.
module nm_pair_model
  import nm_pkg::*;
#(
  parameter int unsigned SEED     = 1,
  parameter int unsigned FAULT_AT = 20000,
  parameter int unsigned QDEPTH   = 32,
  parameter int unsigned LINE_W   = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  // undead core
  output commit_t [5:0]              u_commit,
  input  logic                       u_commit_ready,
  input  logic                       u_squash,
  input  logic                       u_arf_wr_en,
  input  logic [5:0]                 u_arf_wr_idx,
  input  logic [63:0]                u_arf_wr_data,
  input  logic                       u_pc_wr_en,
  input  logic [VA_W-1:0]            u_pc_wr,
  output logic                       u_wb_valid,
  output logic [VA_W-BLK_OFF-1:0]    u_wb_addr,
  output logic [LINE_W-1:0]          u_wb_data,
  output logic                       u_fill_req_valid,
  output logic [VA_W-BLK_OFF-1:0]    u_fill_req_addr,
  output logic [2:0]                 u_fill_req_id,
  input  logic                       u_fill_resp_valid,
  input  logic [2:0]                 u_fill_resp_id,
  input  logic [LINE_W-1:0]          u_fill_resp_data,
  input  logic                       l2_req_valid,
  input  logic [2:0]                 l2_req_id,
  output logic                       l2_req_ready,
  output logic                       l2_resp_valid,
  output logic [2:0]                 l2_resp_id,
  output logic                       l2_resp_hit,
  output logic [LINE_W-1:0]          l2_resp_data,
  output logic                       mem_resp_valid,
  output logic [2:0]                 mem_resp_id,
  // animator core
  output commit_t [1:0]              a_commit,
  input  logic                       a_hold,
  output logic [1:0]                 a_dc_busy,
  input  logic [1:0]                 a_dpf_valid,
  input  logic [PAY_W-1:0]           a_dpf_addr,
  input  logic                       a_ipf_valid,
  input  logic [PAY_W-1:0]           a_ipf_addr,
  output logic                       a_ipf_ready,
  output logic [VA_W-1:0]            a_bp_pred_pc,
  input  logic                       a_bp_pred_taken,
  output logic                       a_bp_res_valid,
  output logic [VA_W-1:0]            a_bp_res_pc,
  output logic                       a_bp_res_taken,
  input  logic [5:0]                 a_arf_rd_idx,
  output logic [63:0]                a_arf_rd_data,
  output logic [VA_W-1:0]            a_pc,
  // observation
  input  logic [2:0]                 hint_dis,
  input  logic [31:0]                resyncs,
  input  logic [$clog2(QDEPTH+1)-1:0] q_count,
  output int                         checks,
  output int                         fails,
  output int                         n_dpf,
  output int                         n_ipf,
  output int                         n_bp_correct,
  output int                         n_branches,
  output int                         n_ustall,
  output int                         n_qfull,
  output int                         n_disable,
  output int                         n_backoff_end,
  output int                         n_resync,
  output int                         n_wb_drop,
  output int                         n_zero_fill,
  output int                         a_n,
  output int                         u_n
);
  function automatic commit_t prog(input int n, input bit faulty);
    commit_t c;
    int blk;
    c = '0;
    c.valid = 1'b1;
    c.pc    = 64'h20000 + 64'(4 * (n % 600)) + 64'(32'h10000 * ((n / 6000) % 4));
    c.is_mem = (n % 3) == 0;
    blk = (5 * (n / 3)) % 4096;
    c.addr  = 64'h100_0000 + 64'(blk) * 64;
    if (faulty) c.addr[10:6] = 5'd0;
    c.is_br = (n % 8) == 7;
    c.taken = ((n / 8) % 4) != 0;
    return c;
  endfunction

  function automatic int arf_val(input int idx, input int n);
    return idx * 1000 + n;
  endfunction

  int seed_state;
  function automatic int rnd(input int m);
    return int'($urandom % m);
  endfunction

  int  u_ncommit;         // instructions offered this cycle
  int  u_total;           // instructions committed by the undead core
  bit  copied_ok;
  int  a_k;
  logic [2:0] dis_q;
  int  resync_base;

  initial begin
    checks = 0; fails = 0; n_dpf = 0; n_ipf = 0; n_bp_correct = 0; n_branches = 0;
    n_ustall = 0; n_qfull = 0; n_disable = 0; n_backoff_end = 0; n_resync = 0;
    n_wb_drop = 0; n_zero_fill = 0; a_n = 0; u_n = 0; u_total = 0; dis_q = '0;
    void'($urandom(SEED));
  end

  // ---------------- stimulus, set after each falling edge ----------------
  always @(negedge clk) begin
    u_commit = '0;
    a_commit = '0;
    u_ncommit = 0;
    a_k = 0;
    a_bp_res_valid = 1'b0;
    a_bp_res_pc = '0;
    a_bp_res_taken = 1'b0;
    if (rst_n && run) begin
      u_ncommit = 3 + rnd(4);
      for (int i = 0; i < u_ncommit; i++) u_commit[i] = prog(u_n + i, u_total + i >= int'(FAULT_AT));
      if (!a_hold) begin
        a_k = rnd(3);
        for (int i = 0; i < a_k; i++) begin
          a_commit[i] = prog(a_n + i, 1'b0);
          if (a_commit[i].is_br) begin
            a_bp_res_valid = 1'b1;
            a_bp_res_pc    = a_commit[i].pc;
            a_bp_res_taken = a_commit[i].taken;
          end
        end
      end
    end
    a_bp_pred_pc = a_bp_res_pc;
    a_dc_busy    = 2'(rnd(4));
    a_ipf_ready  = rnd(4) != 0;
    a_pc         = prog(a_n, 1'b0).pc;
    // undead L1 <-> L2 traffic
    u_wb_valid      = rnd(16) == 0;
    u_wb_addr       = 58'(rnd(1000));
    u_wb_data       = {LINE_W{1'b1}};
    u_fill_req_valid = rnd(8) == 0;
    u_fill_req_addr = 58'(rnd(1000));
    u_fill_req_id   = 3'(rnd(8));
    l2_req_ready    = 1'b1;
    l2_resp_valid   = rnd(8) == 0;
    l2_resp_id      = 3'(rnd(8));
    l2_resp_hit     = rnd(4) != 0;
    l2_resp_data    = {LINE_W/32{32'h600D_DA7A}};
    mem_resp_valid  = rnd(8) == 0;
    mem_resp_id     = 3'(rnd(8));
  end

  assign a_arf_rd_data = 64'(arf_val(int'(a_arf_rd_idx), a_n));

  // ---------------- response checks, sampled before the rising edge ----------------
  always @(negedge clk) begin
    #2;
    if (rst_n && run) begin
      if (a_bp_res_valid) begin
        n_branches++;
        if (a_bp_pred_taken == a_bp_res_taken) n_bp_correct++;
      end
      if (!u_commit_ready && u_ncommit > 0) n_ustall++;
      if (int'(q_count) == int'(QDEPTH)) n_qfull++;
      if (a_dpf_valid != 2'b00) begin
        bit found;
        checks++;
        if ((a_dpf_valid & a_dc_busy) != 2'b00) begin fails++; $display("prefetch on busy port"); end
        found = 0;
        for (int m = a_n + 16; m >= 0 && m > a_n - 3000 && !found; m--)
          if (m % 3 == 0 && blk_addr(prog(m, 1'b0).addr) == a_dpf_addr) found = 1;
        // a faulty undead core may prefetch its own wrong blocks
        if (!found && u_total < int'(FAULT_AT)) begin
          fails++;
          if (fails < 10) $display("D prefetch %h not in the next 16 instructions (animator at %0d)", a_dpf_addr, a_n);
        end
        n_dpf++;
      end
      if (a_ipf_valid && a_ipf_ready) n_ipf++;
      if (u_arf_wr_en) begin
        checks++;
        if (u_arf_wr_data != 64'(arf_val(int'(u_arf_wr_idx), a_n))) begin
          fails++; $display("register %0d copied wrong", u_arf_wr_idx);
        end
      end
      if (u_pc_wr_en) begin
        checks++;
        if (u_pc_wr != prog(a_n, 1'b0).pc) begin fails++; $display("PC copied wrong"); end
      end
      if (u_fill_resp_valid) begin
        if (u_fill_resp_data == '0) n_zero_fill++;
      end
      if (u_wb_valid) n_wb_drop++;
      checks++;
      if (l2_req_valid != u_fill_req_valid) fails++;
    end
  end

  // ---------------- state update at the rising edge ----------------
  always @(posedge clk) begin
    if (rst_n && run) begin
      int k;
      k = 0;
      if (u_commit_ready) begin
        k = u_ncommit;
        u_n += k;
        u_total += k;
      end
      a_n += a_k;
      if (u_pc_wr_en) u_n = a_n;   // resynchronized: continue from the animator
      for (int t = 0; t < 3; t++) begin
        if (hint_dis[t] && !dis_q[t]) n_disable++;
        if (!hint_dis[t] && dis_q[t]) n_backoff_end++;
      end
      dis_q = hint_dis;
      n_resync = int'(resyncs);
    end
  end

  logic unused;
  assign unused = ^{u_squash, a_ipf_addr, u_fill_resp_id, l2_req_id, u_pc_wr[0]};

endmodule

// tb_hint_gathering_unit: random 6-wide commit groups (PCs and data addresses
// from small ranges so the CAMs hit), random hint disables, random queue
// back-pressure and occasional fingerprint packets. A model builds the
// expected hint stream (per instruction: I-cache, D-cache, branch hint; CAM
// filtering with 2-entry FIFO CAMs; disabled types skipped) with the age tag
// = committed count after the group, and the slots of the pushed hint
// packets must reproduce it exactly. Fingerprint packets must be pushed
// unchanged and ahead of hints; the undead core must be stalled while the
// queue refuses packets; resync must load the count and drop pending hints.
module tb_hint_gathering_unit;
  import nm_pkg::*;
  localparam int CW = 6;
  logic clk = 0, rst_n = 0, commit_ready, commit_fire, fp_valid = 0, fp_ready, fp_stall = 0;
  logic q_push_valid, q_push_ready = 1, resync = 0;
  commit_t [CW-1:0] commit;
  logic [AGE_W-1:0] count_before, count_after, resync_count = '0;
  logic [2:0] hint_dis = '0;
  nm_packet_t fp_pkt, q_push_pkt;
  int checks = 0, failures = 0, stalls_q = 0, fp_sent = 0, hints_seen = 0, filtered = 0;
  logic [63:0] exp_q [$];     // {typ(3), age(29 low bits), pay(32)}
  logic [PAY_W-1:0] dcam [2], icam [2];
  bit dv [2], iv [2];
  int dp = 0, ip = 0;
  int cnt = 0;
  bit commit_fire_q = 0;

  hint_gathering_unit #(.COMMIT_W(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit cam(ref logic [PAY_W-1:0] t [2], ref bit v [2], ref int p, input logic [PAY_W-1:0] a);
    for (int e = 0; e < 2; e++) if (v[e] && t[e] == a) return 0;
    t[p] = a; v[p] = 1; p = (p + 1) % 2;
    return 1;
  endfunction

  task automatic check_push();
    if (!(q_push_valid && q_push_ready)) return;
    if (q_push_pkt.slot[0].typ == T_DFP) begin
      checks++;
      if (!fp_valid || q_push_pkt != fp_pkt) failures++;
      fp_sent++;
      return;
    end
    checks++;
    if (fp_valid) failures++;   // fingerprint must win
    for (int j = 0; j < NSLOT; j++) if (q_push_pkt.slot[j].valid) begin
      logic [63:0] got;
      got = {q_push_pkt.slot[j].typ, q_push_pkt.age[28:0], q_push_pkt.slot[j].pay};
      checks++; hints_seen++;
      if (exp_q.size() == 0) begin failures++; $display("extra hint %h", got); end
      else begin
        if (got != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("hint got %h expected %h", got, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
  endtask

  initial begin
    commit = '0; fp_pkt = '0;
    for (int e = 0; e < 2; e++) begin dv[e] = 0; iv[e] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 8000; c++) begin
      @(negedge clk);
      // new stimulus only when the previous group was accepted
      if (c == 0 || commit_fire_q) begin
        commit = '0;
        for (int i = 0; i < CW; i++) begin
          commit[i].valid  = ($urandom % 4) != 0;
          commit[i].pc     = 64'h10000 + 64'($urandom % 24) * 32;
          commit[i].is_mem = ($urandom % 3) == 0;
          commit[i].addr   = 64'h900000 + 64'($urandom % 12) * 64;
          commit[i].is_br  = ($urandom % 5) == 0;
          commit[i].taken  = $urandom % 2;
        end
        if ($urandom % 50 == 0) hint_dis = 3'($urandom);
      end
      q_push_ready = ($urandom % 3) != 0;
      fp_valid = ($urandom % 40) == 0;
      fp_pkt = '0; fp_pkt.age = AGE_W'($urandom);
      for (int j = 0; j < NSLOT; j++) begin fp_pkt.slot[j].valid = 1; fp_pkt.slot[j].typ = T_DFP; fp_pkt.slot[j].pay = $urandom; end
      resync = (c == 4000);
      resync_count = 32'd5000;
      #1;
      check_push();
      if (!commit_ready && !q_push_ready && !resync) stalls_q++;
      if (resync) begin
        checks++; if (commit_ready) failures++;
        exp_q.delete(); cnt = 5000;
        for (int e = 0; e < 2; e++) begin dv[e] = 0; iv[e] = 0; end
        dp = 0; ip = 0;
      end
      if (commit_fire) begin
        int n;
        n = 0;
        for (int i = 0; i < CW; i++) if (commit[i].valid) n++;
        checks++; if (int'(count_before) != cnt || int'(count_after) != cnt + n) failures++;
        cnt += n;
        for (int i = 0; i < CW; i++) if (commit[i].valid) begin
          if (!hint_dis[HK_I]) begin
            if (cam(icam, iv, ip, blk_addr(commit[i].pc)))
              exp_q.push_back({T_IHINT, 29'(cnt), blk_addr(commit[i].pc)});
            else filtered++;
          end
          if (commit[i].is_mem && !hint_dis[HK_D]) begin
            if (cam(dcam, dv, dp, blk_addr(commit[i].addr)))
              exp_q.push_back({T_DHINT, 29'(cnt), blk_addr(commit[i].addr)});
            else filtered++;
          end
          if (commit[i].is_br && !hint_dis[HK_BP])
            exp_q.push_back({T_BHINT, 29'(cnt), commit[i].taken, commit[i].pc[32:2]});
        end
      end
      commit_fire_q = commit_fire;
      @(posedge clk);
    end
    commit = '0; fp_valid = 0; q_push_ready = 1;
    repeat (20) begin @(negedge clk); #1; check_push(); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d hints never sent", exp_q.size()); end
    checks++; if (stalls_q == 0 || fp_sent == 0 || filtered == 0) failures++;
    $display("hints %0d, filtered by CAM %0d, fingerprints %0d, queue stalls %0d", hints_seen, filtered, fp_sent, stalls_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

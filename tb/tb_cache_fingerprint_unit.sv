// tb_cache_fingerprint_unit: a 6-wide random commit stream with loads/stores
// runs over several 1K-instruction intervals with random queue back-pressure.
// The testbench counts D accesses (data block address mod 32) and I accesses
// (PC block mod 32) per interval itself. The first interval after reset is
// partial and must not be sent; for every later interval the 16 packets must
// carry all 32 D entries then all 32 I entries with the right counts and the
// interval-end age. `stall_commit` is obeyed by the stream.
module tb_cache_fingerprint_unit;
  import nm_pkg::*;
  localparam int E = 32, INTV = 1024, CW = 6;
  logic clk = 0, rst_n = 0, flush = 0, commit_fire = 0, pkt_valid, pkt_ready = 0, stall_commit;
  commit_t [CW-1:0] commit;
  logic [AGE_W-1:0] count_before, count_after;
  nm_packet_t pkt;
  int checks = 0, failures = 0, stalls = 0;
  int md [E], mi [E];
  int sd [$], si [$], sage [$];   // expected snapshots (flattened)
  int got_d [E], got_i [E];
  int npkt = 0, intervals_checked = 0;
  logic [AGE_W-1:0] cnt = '0;

  cache_fingerprint_unit #(.ENTRIES(E), .INTERVAL(INTV), .COMMIT_W(CW)) dut (.*);
  assign count_after = cnt + AGE_W'($countones({commit[5].valid, commit[4].valid, commit[3].valid,
                                                 commit[2].valid, commit[1].valid, commit[0].valid}));
  assign count_before = cnt;

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // packet checker
  task automatic take_pkt();
    for (int j = 0; j < NSLOT; j++) begin
      int idx, c;
      idx = int'(pkt.slot[j].pay[31:24]); c = int'(pkt.slot[j].pay[23:0]);
      if (pkt.slot[j].typ == T_DFP) got_d[idx] = c; else got_i[idx] = c;
    end
    npkt++;
    if (npkt == 16) begin
      npkt = 0;
      checks++;
      if (sage.size() == 0) begin failures++; $display("unexpected fingerprint"); end
      else begin
        if (int'(pkt.age) != sage[0]) begin failures++; $display("age %0d expected %0d", pkt.age, sage[0]); end
        for (int e = 0; e < E; e++) begin
          checks += 2;
          if (got_d[e] != sd[e]) begin failures++; if (failures < 10) $display("D[%0d] %0d exp %0d", e, got_d[e], sd[e]); end
          if (got_i[e] != si[e]) begin failures++; if (failures < 10) $display("I[%0d] %0d exp %0d", e, got_i[e], si[e]); end
        end
        for (int e = 0; e < E; e++) begin void'(sd.pop_front()); void'(si.pop_front()); end
        void'(sage.pop_front());
        intervals_checked++;
      end
    end
  endtask

  initial begin
    bit first = 1;
    commit = '0;
    for (int e = 0; e < E; e++) begin md[e] = 0; mi[e] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 12000; c++) begin
      @(negedge clk);
      if (commit_fire) cnt = count_after;
      pkt_ready = ($urandom % 4) != 0;
      commit = '0;
      commit_fire = 0;
      if (stall_commit) stalls++;
      else begin
        for (int i = 0; i < CW; i++) begin
          commit[i].valid  = ($urandom % 5) != 0;
          commit[i].pc     = 64'h4000 + 64'($urandom % 4096) * 4;
          commit[i].is_mem = $urandom % 3 == 0;
          commit[i].addr   = 64'h8000_0000 + 64'($urandom % 65536) * 8;
        end
        commit_fire = 1;
      end
      #1;
      if (commit_fire && (cnt[AGE_W-1:10] != count_after[AGE_W-1:10])) begin
        if (!first) begin
          for (int e = 0; e < E; e++) begin sd.push_back(md[e]); si.push_back(mi[e]); end
          sage.push_back(int'({count_after[AGE_W-1:10], 10'd0}));
        end
        first = 0;
        for (int e = 0; e < E; e++) begin md[e] = 0; mi[e] = 0; end
      end
      if (pkt_valid && pkt_ready) take_pkt();
      if (commit_fire)
        for (int i = 0; i < CW; i++) if (commit[i].valid) begin
          mi[(commit[i].pc >> 6) % E]++;
          if (commit[i].is_mem) md[(commit[i].addr >> 6) % E]++;
        end
      @(posedge clk);
    end
    commit = '0; commit_fire = 0;
    pkt_ready = 1;
    repeat (200) begin @(negedge clk); #1; if (pkt_valid && pkt_ready) take_pkt(); end
    checks++; if (intervals_checked < 5) failures++;
    $display("intervals checked %0d, commit stalls %0d", intervals_checked, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hint_distribution_unit: the testbench plays the queue. It offers packets
// of mixed D/I/branch hints (and occasional fingerprint packets) with rising
// age tags while the animator's committed count creeps up 0-2 per cycle.
// Each payload carries its own age and a serial number, so at every output
// the testbench checks: the hint is not released before age <= count + window
// (16 for D, 4 for I and branch), per-type order is kept, the queue head is
// not taken while its age is beyond count + 16, and at the end every hint
// has come out. Prefetch ports refuse at random.
module tb_hint_distribution_unit;
  import nm_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic q_pop_valid = 0, q_pop_ready;
  nm_packet_t q_pop_pkt;
  logic [AGE_W-1:0] anim_count = '0;
  logic dpf_valid, dpf_ready = 0, ipf_valid, ipf_ready = 0, bph_valid, bph_taken, fp_valid, fp_is_i, fp_ready = 0;
  logic [PAY_W-1:0] dpf_addr, ipf_addr;
  logic [PAY_W-2:0] bph_idx;
  logic [7:0] fp_idx;
  logic [23:0] fp_cnt;
  logic [AGE_W-1:0] fp_age;
  int checks = 0, failures = 0;
  nm_packet_t pq [$];
  int exp_t [5][$];   // per type: payload serial order
  int got [5];
  int sent [5];
  int held_head = 0;

  hint_distribution_unit #(.DWIN(16), .IWIN(4), .BPWIN(4), .BUF(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic out_chk(input int t, input logic [PAY_W-1:0] pay, input int win);
    int age;
    age = int'(pay[31:8]);
    checks++;
    if (age > int'(anim_count) + win) begin
      failures++; if (failures < 10) $display("type %0d age %0d released at count %0d", t, age, anim_count);
    end
    checks++;
    if (exp_t[t].size() == 0 || exp_t[t][0] != int'(pay)) begin
      failures++; if (failures < 10) $display("type %0d order", t);
    end else void'(exp_t[t].pop_front());
    got[t]++;
  endtask

  initial begin
    int age = 30;
    for (int t = 0; t < 5; t++) begin got[t] = 0; sent[t] = 0; end
    // build the packet stream
    for (int p = 0; p < 600; p++) begin
      nm_packet_t k;
      k = '0;
      age += $urandom % 6;
      k.age = AGE_W'(age);
      if ($urandom % 25 == 0) begin
        for (int j = 0; j < NSLOT; j++) begin
          k.slot[j].valid = 1; k.slot[j].typ = (p % 2) ? T_IFP : T_DFP;
          k.slot[j].pay = {8'(j), 24'(age)};
          exp_t[(p % 2) ? 4 : 3].push_back(int'({8'(j), 24'(age)}));
        end
      end else
        for (int j = 0; j < NSLOT; j++) if ($urandom % 4 != 0) begin
          int t;
          t = $urandom % 3;
          k.slot[j].valid = 1;
          k.slot[j].typ = hint_type_e'(t + 1);
          k.slot[j].pay = {24'(age), 8'(sent[t])};
          exp_t[t].push_back(int'({24'(age), 8'(sent[t])}));
          sent[t]++;
        end
      pq.push_back(k);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    while (pq.size() > 0 || exp_t[0].size() + exp_t[1].size() + exp_t[2].size() + exp_t[3].size() + exp_t[4].size() > 0) begin
      @(negedge clk);
      q_pop_valid = pq.size() > 0;
      if (q_pop_valid) q_pop_pkt = pq[0];
      dpf_ready = $urandom % 3 != 0;
      ipf_ready = $urandom % 3 != 0;
      fp_ready  = $urandom % 2;
      #1;
      if (q_pop_valid && q_pop_ready) begin
        checks++;
        if (int'(q_pop_pkt.age) > int'(anim_count) + 16) failures++;
      end
      if (q_pop_valid && !q_pop_ready) held_head++;
      if (dpf_valid && dpf_ready) out_chk(0, dpf_addr, 16);
      if (ipf_valid && ipf_ready) out_chk(1, ipf_addr, 4);
      if (bph_valid) out_chk(2, {bph_taken, bph_idx}, 4);
      if (fp_valid && fp_ready) begin
        checks++;
        if (exp_t[fp_is_i ? 4 : 3].size() == 0 || exp_t[fp_is_i ? 4 : 3][0] != int'({fp_idx, fp_cnt}) ||
            int'(fp_age) != int'(fp_cnt)) failures++;
        else void'(exp_t[fp_is_i ? 4 : 3].pop_front());
      end
      @(posedge clk);
      if (q_pop_valid && q_pop_ready) void'(pq.pop_front());
      anim_count <= anim_count + AGE_W'($urandom % 3);
    end
    checks++; if (held_head == 0) failures++;
    $display("D %0d I %0d BP %0d hints delivered; head held %0d cycles; final count %0d",
             got[0], got[1], got[2], held_head, anim_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

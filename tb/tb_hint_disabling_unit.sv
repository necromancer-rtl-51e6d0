// tb_hint_disabling_unit: directed cases with distributions built by the
// testbench and the expected decision worked out from K = sum|S-V| and
// T = sum(S+V):
//   identical distributions                  -> nothing disabled
//   D-cache distributions far apart          -> D disabled, event pulse
//   I table at exactly 80% similarity        -> kept (K*100 == 20*T)
//   I table just below 80%                   -> I disabled
//   branch score 7 wins / 3 losses (= 70%)   -> kept;  6 / 3 -> disabled
//   back-off (100 instructions here) expires -> re-enabled
//   fingerprint of an interval already passed-> dropped, unit accepts again
//   clear keeps a running back-off
//   40 random D/I distribution pairs with the decision from K*100 > 20*T
//   comparison takes ENTRIES + 1 cycles after both sides are present.
module tb_hint_disabling_unit;
  import nm_pkg::*;
  localparam int E = 32, BO = 100;
  logic clk = 0, rst_n = 0, clear = 0;
  logic fp_valid = 0, fp_is_i = 0, fp_ready, s_valid = 0;
  logic [7:0] fp_idx = '0;
  logic [23:0] fp_cnt = '0;
  logic [AGE_W-1:0] fp_age = '0, s_age = '0, anim_count = '0;
  logic [E-1:0][15:0] s_d = '0, s_i = '0;
  logic ev_valid = 0, ev_nm_correct = 0, ev_orig_correct = 0;
  logic [2:0] hint_dis, dis_event, ev_seen;
  int checks = 0, failures = 0;
  int vd [E], vi [E];

  hint_disabling_unit #(.ENTRIES(E), .CNT_W(16), .D_THR(80), .I_THR(80), .BP_THR(70), .BACKOFF(BO)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!rst_n) ev_seen <= '0; else ev_seen <= ev_seen | dis_event;

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (hint_dis=%b)", msg, hint_dis); end
  endtask

  task automatic send_v(input int age);
    for (int t = 0; t < 2; t++)
      for (int e = 0; e < E; e++) begin
        @(negedge clk);
        fp_valid = 1; fp_is_i = t; fp_idx = 8'(e); fp_cnt = 24'(t ? vi[e] : vd[e]); fp_age = AGE_W'(age);
        #1; while (!fp_ready) begin @(negedge clk); #1; end
      end
    @(negedge clk); fp_valid = 0;
  endtask

  // animator reaches the end of interval `age`; returns cycles until decision
  task automatic send_s(input int age, output int lat);
    @(negedge clk);
    s_valid = 1; s_age = AGE_W'(age);
    anim_count = AGE_W'(age);
    @(negedge clk); s_valid = 0;
    lat = 1;
    while (!fp_ready) begin @(negedge clk); lat++; end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int lat, k, tsum;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1: identical
    for (int e = 0; e < E; e++) begin vd[e] = e; vi[e] = 2 * e; s_d[e] = 16'(e); s_i[e] = 16'(2 * e); end
    send_v(1024); send_s(1024, lat);
    chk(hint_dis == 3'b000 && ev_seen == 0, "identical distributions kept");
    chk(lat == E + 2, $sformatf("comparison latency %0d", lat));  // s_valid cycle + start + E entries
    // 2: D far apart
    for (int e = 0; e < E; e++) begin vd[e] = (e < 16) ? 10 : 0; s_d[e] = (e < 16) ? 0 : 10; end
    send_v(2048); send_s(2048, lat);
    chk(hint_dis == 3'b001 && ev_seen == 3'b001, "D disabled");
    // back-off: D was disabled at count 2048 -> enabled again at 2048 + BO
    @(negedge clk); anim_count = AGE_W'(2048 + BO - 1); @(negedge clk); @(negedge clk);
    chk(hint_dis[HK_D], "D still in back-off");
    @(negedge clk); anim_count = AGE_W'(2048 + BO); @(negedge clk); @(negedge clk);
    chk(!hint_dis[HK_D], "D back-off expired");
    for (int e = 0; e < E; e++) s_d[e] = 16'(vd[e]);
    // 3: I exactly at 80%: T = 200, K = 40
    for (int e = 0; e < E; e++) begin vi[e] = 0; s_i[e] = 0; end
    vi[0] = 100; s_i[0] = 80; s_i[1] = 20; // K = 20 + 20 = 40, T = 200
    send_v(3072); send_s(3072, lat);
    chk(!hint_dis[HK_I], "I at exactly 80% kept");
    // 4: just below: K = 42, T = 200
    vi[0] = 100; s_i[0] = 79; s_i[1] = 21;
    send_v(4096); send_s(4096, lat);
    chk(hint_dis[HK_I] && ev_seen[HK_I], "I below 80% disabled");
    chk(hint_dis == 3'b010, "only I disabled");
    @(negedge clk); anim_count = AGE_W'(4096 + BO); @(negedge clk); @(negedge clk);
    chk(!hint_dis[HK_I], "I back-off expired");
    // 5: branch score 7 wins, 3 losses = exactly 70%
    for (int n = 0; n < 10; n++) begin
      @(negedge clk); ev_valid = 1; ev_nm_correct = (n < 7); ev_orig_correct = (n >= 7);
    end
    @(negedge clk); ev_valid = 0;
    send_s(5120, lat);
    chk(!hint_dis[HK_BP], "BP at 70% kept");
    for (int n = 0; n < 12; n++) begin
      @(negedge clk); ev_valid = 1;
      // 6 wins, 3 losses, 3 ties
      ev_nm_correct = (n < 6) || (n >= 9); ev_orig_correct = (n >= 6);
    end
    @(negedge clk); ev_valid = 0;
    @(negedge clk); s_valid = 1; s_age = 32'd6144; anim_count = 32'd6144; @(negedge clk); s_valid = 0;
    @(negedge clk);
    chk(hint_dis[HK_BP] && ev_seen[HK_BP], "BP below 70% disabled");
    // 6: stale fingerprint (interval 6144 already passed by 7168)
    for (int e = 0; e < E; e++) begin vd[e] = 0; s_d[e] = 16'(e); end
    @(negedge clk); s_valid = 1; s_age = 32'd7168; anim_count = 32'd7168; @(negedge clk); s_valid = 0;
    send_v(6144);
    repeat (3) @(negedge clk);
    chk(fp_ready && !hint_dis[HK_D], "stale fingerprint dropped");
    // 7: clear keeps the back-off of the disabled branch hints
    @(negedge clk); ev_valid = 1; ev_nm_correct = 0; ev_orig_correct = 1;
    @(negedge clk); ev_valid = 0; s_valid = 1; s_age = 32'd8192; anim_count = 32'd8192;
    @(negedge clk); s_valid = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(hint_dis == 3'b100 && fp_ready, "clear keeps back-off");
    // 8: random distributions, decision worked out from K and T
    for (int r = 0; r < 40; r++) begin
      int kd, td, ki, ti, spread;
      bit exp_d, exp_i;
      spread = int'($urandom % 12);
      kd = 0; td = 0; ki = 0; ti = 0;
      for (int e = 0; e < E; e++) begin
        int sd, si;
        vd[e] = int'($urandom % 20);
        vi[e] = int'($urandom % 40);
        sd = vd[e] + int'($urandom % (2 * spread + 1)) - spread; if (sd < 0) sd = 0;
        si = vi[e] + int'($urandom % (spread + 1));
        s_d[e] = 16'(sd); s_i[e] = 16'(si);
        kd += (sd > vd[e]) ? sd - vd[e] : vd[e] - sd; td += sd + vd[e];
        ki += si - vi[e];                             ti += si + vi[e];
      end
      exp_d = kd * 100 > 20 * td;
      exp_i = ki * 100 > 20 * ti;
      send_v(9216 + 1024 * r); send_s(9216 + 1024 * r, lat);
      chk(hint_dis[HK_D] == exp_d && hint_dis[HK_I] == exp_i,
          $sformatf("random %0d: D K=%0d T=%0d I K=%0d T=%0d", r, kd, td, ki, ti));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

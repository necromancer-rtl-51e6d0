// hint_disabling_unit: decides when each hint type stops being useful.
//
// Cache hints. Over each disabling interval (INTERVAL = 1K committed
// instructions) both cores build a 32-entry distribution of their committed
// cache accesses (cache_fingerprint_table). The undead core's distribution V
// arrives through the queue (fp_*, one entry per cycle, stored here); the
// animator's own distribution S for the same interval arrives on s_* when the
// animator finishes that interval. When both are present, the unit walks the
// 32 entries, one per cycle, accumulating K = sum|S_i - V_i| and
// T = sum(S_i + V_i). Similarity is 1 - K/T; the hint type is disabled when
// the similarity is below its threshold, i.e. K*100 > (100 - THR)*T
// (D_THR, I_THR in percent). A distribution whose interval the animator has
// already passed is dropped.
//
// Branch hints. A single signed score counter is moved on each resolved
// animator branch (ev_*): +(100 - BP_THR) when only the NM predictor was right,
// -BP_THR when only the original predictor was right. At each animator
// interval end (s_valid) the branch hints are disabled if the score is below
// zero (the NM predictor was right in fewer than BP_THR percent of the
// branches where the two differed); the score then restarts at zero.
//
// A disabled type stays disabled for BACKOFF animator-committed instructions
// (the back-off period), then is enabled again. hint_dis[k] (k = HK_D, HK_I,
// HK_BP) goes to the undead core's gathering unit and the NM predictor;
// dis_event[k] pulses for one cycle when type k becomes disabled, which the
// resynchronization controller uses. `clear` (end of a resynchronization)
// drops partially received fingerprints and the branch score; a disabled type
// keeps its back-off period across the resynchronization.
// The similarity and score formulas are this implementation's reading of the
// threshold rules; the back-off length is its own choice.
module hint_disabling_unit
  import nm_pkg::*;
#(
  parameter int unsigned ENTRIES  = 32,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned D_THR    = 80,
  parameter int unsigned I_THR    = 80,
  parameter int unsigned BP_THR   = 70,
  parameter int unsigned BACKOFF  = 4096
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          fp_valid,
  input  logic                          fp_is_i,
  input  logic [7:0]                    fp_idx,
  input  logic [23:0]                   fp_cnt,
  input  logic [AGE_W-1:0]              fp_age,
  output logic                          fp_ready,
  input  logic                          s_valid,
  input  logic [AGE_W-1:0]              s_age,
  input  logic [ENTRIES-1:0][CNT_W-1:0] s_d,
  input  logic [ENTRIES-1:0][CNT_W-1:0] s_i,
  input  logic                          ev_valid,
  input  logic                          ev_nm_correct,
  input  logic                          ev_orig_correct,
  input  logic [AGE_W-1:0]              anim_count,
  output logic [2:0]                    hint_dis,
  output logic [2:0]                    dis_event
);
  localparam int unsigned IW  = $clog2(ENTRIES);
  localparam int unsigned SW  = CNT_W + IW + 2;   // sums over the table
  localparam int unsigned NW  = $clog2(2 * ENTRIES + 1);

  logic [ENTRIES-1:0][CNT_W-1:0] v_d, v_i;
  logic [AGE_W-1:0]              v_age_q, s_age_q;
  logic [NW-1:0]                 v_n_q;
  logic                          s_have_q, busy_q;
  logic [IW-1:0]                 k_q;
  logic [SW-1:0]                 kd_q, ki_q, td_q, ti_q;
  logic signed [23:0]            score_q;
  logic [2:0][AGE_W-1:0]         until_q;
  logic                          v_full, match, stale;

  function automatic logic [CNT_W-1:0] absdiff(input logic [CNT_W-1:0] a, input logic [CNT_W-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Similarity below THR percent: K*100 > (100-THR)*T.
  function automatic logic dissimilar(input logic [SW-1:0] k, input logic [SW-1:0] t,
                                      input int unsigned thr);
    logic [SW+7:0] lhs, rhs;
    lhs = (SW+8)'(k) * 100;
    rhs = (SW+8)'(t) * (SW+8)'(100 - thr);
    return lhs > rhs;
  endfunction

  assign v_full   = (v_n_q == NW'(2 * ENTRIES));
  assign fp_ready = !v_full;
  assign match    = v_full && s_have_q && (s_age_q == v_age_q);
  assign stale    = v_full && s_have_q && !match && age_le(v_age_q, s_age_q);

  logic [SW-1:0] kd_n, ki_n, td_n, ti_n;
  always_comb begin
    kd_n = kd_q + SW'(absdiff(s_d[k_q], v_d[k_q]));
    ki_n = ki_q + SW'(absdiff(s_i[k_q], v_i[k_q]));
    td_n = td_q + SW'(s_d[k_q]) + SW'(v_d[k_q]);
    ti_n = ti_q + SW'(s_i[k_q]) + SW'(v_i[k_q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= '0; v_i <= '0; v_age_q <= '0; v_n_q <= '0;
      s_age_q <= '0; s_have_q <= 1'b0; busy_q <= 1'b0; k_q <= '0;
      kd_q <= '0; ki_q <= '0; td_q <= '0; ti_q <= '0;
      score_q <= '0; until_q <= '0; hint_dis <= '0; dis_event <= '0;
    end else if (clear) begin
      v_n_q <= '0; s_have_q <= 1'b0; busy_q <= 1'b0;
      score_q <= '0; dis_event <= '0;
    end else begin
      dis_event <= '0;

      // Undead fingerprint entries.
      if (fp_valid && fp_ready) begin
        if (fp_is_i) v_i[fp_idx[IW-1:0]] <= CNT_W'(fp_cnt);
        else         v_d[fp_idx[IW-1:0]] <= CNT_W'(fp_cnt);
        v_age_q <= fp_age;
        v_n_q   <= v_n_q + 1'b1;
      end

      // Animator fingerprint of the interval just ended.
      if (s_valid) begin
        s_have_q <= 1'b1;
        s_age_q  <= s_age;
      end

      if (stale && !busy_q) v_n_q <= '0;

      // Walk the tables.
      if (match && !busy_q && !s_valid) begin
        busy_q <= 1'b1;
        k_q    <= '0;
        kd_q <= '0; ki_q <= '0; td_q <= '0; ti_q <= '0;
      end else if (busy_q) begin
        kd_q <= kd_n; ki_q <= ki_n; td_q <= td_n; ti_q <= ti_n;
        k_q  <= k_q + 1'b1;
        if (k_q == IW'(ENTRIES - 1)) begin
          busy_q   <= 1'b0;
          v_n_q    <= '0;
          s_have_q <= 1'b0;
          if (!hint_dis[HK_D] && dissimilar(kd_n, td_n, D_THR)) begin
            hint_dis[HK_D]  <= 1'b1;
            dis_event[HK_D] <= 1'b1;
            until_q[HK_D]   <= anim_count + AGE_W'(BACKOFF);
          end
          if (!hint_dis[HK_I] && dissimilar(ki_n, ti_n, I_THR)) begin
            hint_dis[HK_I]  <= 1'b1;
            dis_event[HK_I] <= 1'b1;
            until_q[HK_I]   <= anim_count + AGE_W'(BACKOFF);
          end
        end
      end

      // Branch-hint score.
      if (s_valid) begin
        score_q <= '0;
        if (!hint_dis[HK_BP] && score_q < 0) begin
          hint_dis[HK_BP]  <= 1'b1;
          dis_event[HK_BP] <= 1'b1;
          until_q[HK_BP]   <= anim_count + AGE_W'(BACKOFF);
        end
      end else if (ev_valid && ev_nm_correct && !ev_orig_correct)
        score_q <= score_q + 24'(100 - BP_THR);
      else if (ev_valid && !ev_nm_correct && ev_orig_correct)
        score_q <= score_q - 24'(BP_THR);

      // End of back-off periods.
      for (int t = 0; t < 3; t++)
        if (hint_dis[t] && !dis_event[t] && age_le(until_q[t], anim_count))
          hint_dis[t] <= 1'b0;
    end
  end

endmodule

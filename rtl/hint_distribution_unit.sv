// hint_distribution_unit: animator-core side consumer of the hint queue.
//
// Hints are synchronized by committed-instruction count, not by time: a hint
// of a given type is applied once its age tag is no later than the animator's
// committed count plus that type's release window (D-cache 16, I-cache 4,
// branch 4 instructions). The unit pops the head packet of the queue when its
// age tag is within the largest window and every slot fits into the buffer of
// its type (hint_type_buffer, one per type), then releases each buffered hint
// on its own window:
//   D-cache hint  -> dpf_* (prefetch into the D-cache through a free port)
//   I-cache hint  -> ipf_* (prefetch through the added I-cache port)
//   branch hint   -> bph_* (update of the NM branch predictor, always taken)
//   fingerprints  -> fp_*  (to the hint disabling unit, released at once,
//                           D entries before I entries)
// dpf/ipf/fp are valid/ready; a held hint waits in its buffer. `flush`
// empties the buffers (resynchronization). Ages compare with wrap-around.
// The per-type buffers and the pop rule are implementation choices; the
// release rule and window sizes follow the coupled-core scheme.
module hint_distribution_unit
  import nm_pkg::*;
#(
  parameter int unsigned DWIN  = 16,
  parameter int unsigned IWIN  = 4,
  parameter int unsigned BPWIN = 4,
  parameter int unsigned BUF   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              q_pop_valid,
  input  nm_packet_t        q_pop_pkt,
  output logic              q_pop_ready,
  input  logic [AGE_W-1:0]  anim_count,
  output logic              dpf_valid,
  output logic [PAY_W-1:0]  dpf_addr,
  input  logic              dpf_ready,
  output logic              ipf_valid,
  output logic [PAY_W-1:0]  ipf_addr,
  input  logic              ipf_ready,
  output logic              bph_valid,
  output logic [PAY_W-2:0]  bph_idx,
  output logic              bph_taken,
  output logic              fp_valid,
  output logic              fp_is_i,
  output logic [7:0]        fp_idx,
  output logic [23:0]       fp_cnt,
  output logic [AGE_W-1:0]  fp_age,
  input  logic              fp_ready
);
  localparam int unsigned NT   = 5;  // buffers for T_DHINT .. T_IFP
  localparam int unsigned CW   = $clog2(BUF + 1);
  localparam int unsigned MAXW = (DWIN > IWIN) ? ((DWIN > BPWIN) ? DWIN : BPWIN)
                                               : ((IWIN > BPWIN) ? IWIN : BPWIN);

  logic [NT-1:0][NSLOT-1:0]       b_in_v;
  logic [NSLOT-1:0][PAY_W-1:0]    b_in_p;
  logic [NT-1:0][CW-1:0]          b_free;
  logic [NT-1:0]                  b_ov, b_or;
  logic [NT-1:0][AGE_W-1:0]       b_age;
  logic [NT-1:0][PAY_W-1:0]       b_pay;
  logic [NT-1:0][CW-1:0]          need;
  logic                           fits, in_win, pop;

  always_comb begin
    need = '0;
    for (int s = 0; s < NSLOT; s++) begin
      b_in_p[s] = q_pop_pkt.slot[s].pay;
      for (int t = 0; t < NT; t++)
        if (q_pop_pkt.slot[s].valid && q_pop_pkt.slot[s].typ == hint_type_e'(t + 1))
          need[t] = need[t] + 1'b1;
    end
    fits = 1'b1;
    for (int t = 0; t < NT; t++) if (need[t] > b_free[t]) fits = 1'b0;
    in_win      = age_le(q_pop_pkt.age, anim_count + AGE_W'(MAXW));
    q_pop_ready = fits && in_win && !flush;
    pop         = q_pop_valid && q_pop_ready;
    for (int t = 0; t < NT; t++)
      for (int s = 0; s < NSLOT; s++)
        b_in_v[t][s] = pop && q_pop_pkt.slot[s].valid &&
                       q_pop_pkt.slot[s].typ == hint_type_e'(t + 1);
  end

  for (genvar t = 0; t < NT; t++) begin : g_buf
    logic [NSLOT-1:0][PAY_W-1:0] packed_p;
    // Pack this type's slots to the front, keeping their order.
    always_comb begin
      int unsigned n;
      n        = 0;
      packed_p = '0;
      for (int s = 0; s < NSLOT; s++)
        if (b_in_v[t][s]) begin
          packed_p[n] = b_in_p[s];
          n++;
        end
    end
    logic [NSLOT-1:0] pv;
    always_comb begin
      int unsigned n;
      n  = 0;
      pv = '0;
      for (int s = 0; s < NSLOT; s++) if (b_in_v[t][s]) n++;
      for (int s = 0; s < NSLOT; s++) pv[s] = (s < n);
    end
    hint_type_buffer #(.DEPTH(BUF), .NIN(NSLOT)) u_b (
      .clk, .rst_n, .flush, .in_valid(pv), .in_age(q_pop_pkt.age), .in_pay(packed_p),
      .free(b_free[t]), .out_valid(b_ov[t]), .out_ready(b_or[t]),
      .out_age(b_age[t]), .out_pay(b_pay[t]));
  end

  always_comb begin
    logic d_rel, i_rel, b_rel;
    d_rel = b_ov[0] && age_le(b_age[0], anim_count + AGE_W'(DWIN));
    i_rel = b_ov[1] && age_le(b_age[1], anim_count + AGE_W'(IWIN));
    b_rel = b_ov[2] && age_le(b_age[2], anim_count + AGE_W'(BPWIN));
    dpf_valid = d_rel;
    dpf_addr  = b_pay[0];
    ipf_valid = i_rel;
    ipf_addr  = b_pay[1];
    bph_valid = b_rel;
    bph_taken = b_pay[2][PAY_W-1];
    bph_idx   = b_pay[2][PAY_W-2:0];
    fp_valid  = b_ov[3] || b_ov[4];
    fp_is_i   = !b_ov[3];
    fp_idx    = b_ov[3] ? b_pay[3][31:24] : b_pay[4][31:24];
    fp_cnt    = b_ov[3] ? b_pay[3][23:0]  : b_pay[4][23:0];
    fp_age    = b_ov[3] ? b_age[3] : b_age[4];
  end

  // Handshakes back to the buffers, kept apart from the valid logic above.
  assign b_or[0] = dpf_valid && dpf_ready;
  assign b_or[1] = ipf_valid && ipf_ready;
  assign b_or[2] = bph_valid;
  assign b_or[3] = fp_ready;
  assign b_or[4] = fp_ready && !b_ov[3];

endmodule

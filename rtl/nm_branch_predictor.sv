// nm_branch_predictor: branch prediction of the animator core.
//
// Three tables of 2-bit saturating counters:
//   orig_bht : the animator's original bimodal predictor, trained by the
//              animator's own resolved branches;
//   nm_bht   : the NM predictor, a second bimodal table trained only by the
//              branch hints coming from the undead core (index = low PC bits);
//   chooser  : per-PC tournament selector; it moves toward the table that was
//              right when exactly one of them was right.
// The prediction (pred_taken, combinational from pred_pc) comes from nm_bht
// when the chooser counter is >= 2 and hints are enabled (bp_dis low), else
// from orig_bht. On a resolved branch (res_*) both predictions are formed
// from the tables as they are in that cycle and an event (ev_*) says which of
// the two was right; the hint disabling unit keeps its score from these.
// Table size follows the 1024-entry history table; counter width, chooser
// size and the recompute-at-resolve rule are implementation choices.
module nm_branch_predictor
  import nm_pkg::*;
#(
  parameter int unsigned BHT     = 1024,
  parameter int unsigned CHOOSER = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bp_dis,
  input  logic              hint_valid,
  input  logic [PAY_W-2:0]  hint_idx,
  input  logic              hint_taken,
  input  logic [VA_W-1:0]   pred_pc,
  output logic              pred_taken,
  output logic              pred_use_nm,
  input  logic              res_valid,
  input  logic [VA_W-1:0]   res_pc,
  input  logic              res_taken,
  output logic              ev_valid,
  output logic              ev_nm_correct,
  output logic              ev_orig_correct
);
  localparam int unsigned BW = $clog2(BHT);
  localparam int unsigned CWD = $clog2(CHOOSER);

  logic [1:0] orig_bht [BHT];
  logic [1:0] nm_bht   [BHT];
  logic [1:0] chooser  [CHOOSER];

  function automatic logic [1:0] sat(input logic [1:0] c, input logic up);
    if (up)  return (c == 2'd3) ? c : c + 2'd1;
    else     return (c == 2'd0) ? c : c - 2'd1;
  endfunction

  logic [BW-1:0]  p_bi, r_bi, h_bi;
  logic [CWD-1:0] p_ci, r_ci;
  logic           r_nm_t, r_or_t;

  assign p_bi = pred_pc[2 +: BW];
  assign p_ci = pred_pc[2 +: CWD];
  assign r_bi = res_pc[2 +: BW];
  assign r_ci = res_pc[2 +: CWD];
  assign h_bi = hint_idx[BW-1:0];

  assign pred_use_nm = !bp_dis && chooser[p_ci][1];
  assign pred_taken  = pred_use_nm ? nm_bht[p_bi][1] : orig_bht[p_bi][1];

  assign r_nm_t          = nm_bht[r_bi][1];
  assign r_or_t          = orig_bht[r_bi][1];
  assign ev_valid        = res_valid;
  assign ev_nm_correct   = (r_nm_t == res_taken);
  assign ev_orig_correct = (r_or_t == res_taken);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BHT; i++) begin
        orig_bht[i] <= 2'd1;
        nm_bht[i]   <= 2'd1;
      end
      for (int i = 0; i < CHOOSER; i++) chooser[i] <= 2'd1;
    end else begin
      if (hint_valid) nm_bht[h_bi] <= sat(nm_bht[h_bi], hint_taken);
      if (res_valid) begin
        orig_bht[r_bi] <= sat(orig_bht[r_bi], res_taken);
        if (ev_nm_correct != ev_orig_correct)
          chooser[r_ci] <= sat(chooser[r_ci], ev_nm_correct);
      end
    end
  end

endmodule

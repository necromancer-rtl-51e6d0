// tb_nm_branch_predictor: random hints, resolved branches and predictions over
// a few dozen PCs, compared each cycle with a model of the three 2-bit tables
// (original bimodal, hint-trained NM bimodal, chooser). Also checks that
// bp_dis forces the original predictor and that the chooser learns to pick
// the NM predictor when the hints are right and the original one is not.
module tb_nm_branch_predictor;
  import nm_pkg::*;
  localparam int BHT = 1024;
  logic clk = 0, rst_n = 0, bp_dis = 0, hint_valid = 0, hint_taken = 0, res_valid = 0, res_taken = 0;
  logic [PAY_W-2:0] hint_idx = '0;
  logic [VA_W-1:0] pred_pc = '0, res_pc = '0;
  logic pred_taken, pred_use_nm, ev_valid, ev_nm_correct, ev_orig_correct;
  int checks = 0, failures = 0, nm_used = 0;
  int o [BHT], n [BHT], c [BHT];

  nm_branch_predictor #(.BHT(BHT), .CHOOSER(BHT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int up(int v, bit t);
    return t ? (v == 3 ? 3 : v + 1) : (v == 0 ? 0 : v - 1);
  endfunction

  initial begin
    for (int i = 0; i < BHT; i++) begin o[i] = 1; n[i] = 1; c[i] = 1; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int pi, ri, hi;
      bit exp_use, exp_pred;
      @(negedge clk);
      // PCs 0x1000..; hints say "taken" for even slots, resolution is taken for
      // even slots in the second half (hints become right, original lags).
      pi = $urandom % 40; ri = $urandom % 40; hi = $urandom % 40;
      pred_pc = 64'h1000 + 64'(pi) * 4;
      res_pc  = 64'h1000 + 64'(ri) * 4;
      hint_idx = (PAY_W-1)'((64'h1000 + 64'(hi) * 4) >> 2);
      hint_valid = $urandom % 2;
      hint_taken = (hi % 2 == 0);
      res_valid = $urandom % 2;
      res_taken = (cyc < 3000) ? $urandom % 2 : (ri % 2 == 0) ^ (($urandom % 8) == 0);
      bp_dis = (cyc % 1000) > 900;
      #1;
      begin
        int pix, rix, hix;
        pix = (1024 + pi) % BHT; rix = (1024 + ri) % BHT; hix = (1024 + hi) % BHT;
        exp_use  = !bp_dis && c[pix] >= 2;
        exp_pred = exp_use ? n[pix] >= 2 : o[pix] >= 2;
        checks++;
        if (pred_use_nm !== exp_use || pred_taken !== exp_pred) begin
          failures++; if (failures < 10) $display("cycle %0d pred mismatch", cyc);
        end
        if (pred_use_nm) nm_used++;
        if (res_valid) begin
          checks++;
          if (!ev_valid || ev_nm_correct != ((n[rix] >= 2) == res_taken) || ev_orig_correct != ((o[rix] >= 2) == res_taken))
            failures++;
        end
        @(posedge clk);
        if (res_valid) begin
          bit nmc, orc;
          nmc = (n[rix] >= 2) == res_taken; orc = (o[rix] >= 2) == res_taken;
          o[rix] = up(o[rix], res_taken);
          if (nmc != orc) c[rix] = up(c[rix], nmc);
        end
        if (hint_valid) n[hix] = up(n[hix], hint_taken);
      end
    end
    checks++; if (nm_used == 0) failures++;
    $display("NM predictor chosen %0d times", nm_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

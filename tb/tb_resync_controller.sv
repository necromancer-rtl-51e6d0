// tb_resync_controller: a disable event triggers a resynchronization; the
// testbench checks one squash cycle, 64 register writes carrying the
// animator's register values (a function of the index) in order, the PC
// write, the done pulse, the holds, and the total length of NREG + 3 cycles.
// A second case shows that an event with MIN_DISABLED = 2 and only one type
// disabled does not trigger.
module tb_resync_controller;
  import nm_pkg::*;
  localparam int NREG = 64;
  logic clk = 0, rst_n = 0, force_resync = 0;
  logic [2:0] dis_event = '0, hint_dis = '0;
  logic busy, anim_hold, undead_hold, squash, arf_wr_en, pc_wr_en, done;
  logic [5:0] arf_rd_idx, arf_wr_idx;
  logic [63:0] arf_rd_data, arf_wr_data;
  logic [VA_W-1:0] anim_pc, pc_wr;
  logic [31:0] resyncs;
  logic busy2, ah2, uh2, sq2, we2, pe2, d2;
  logic [5:0] ri2, wi2; logic [63:0] wd2; logic [VA_W-1:0] pw2; logic [31:0] rs2;
  int checks = 0, failures = 0;

  assign arf_rd_data = 64'hA5A5_0000_0000_0000 | 64'(arf_rd_idx) * 64'h1111;
  assign anim_pc = 64'h0000_0001_2000_0040;

  resync_controller #(.NREG(NREG), .MIN_DISABLED(1)) dut (.*);
  resync_controller #(.NREG(NREG), .MIN_DISABLED(2)) dut2 (
    .clk, .rst_n, .dis_event, .hint_dis, .force_resync(1'b0), .busy(busy2), .anim_hold(ah2),
    .undead_hold(uh2), .squash(sq2), .arf_rd_idx(ri2), .arf_rd_data(64'd0), .arf_wr_en(we2),
    .arf_wr_idx(wi2), .arf_wr_data(wd2), .anim_pc, .pc_wr_en(pe2), .pc_wr(pw2), .done(d2), .resyncs(rs2));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    int nw, cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    dis_event = 3'b001; hint_dis = 3'b001;
    @(negedge clk);
    dis_event = '0;
    cycles = 0; nw = 0;
    chk(squash && anim_hold && undead_hold, "squash first");
    while (!done) begin
      if (arf_wr_en) begin
        chk(int'(arf_wr_idx) == nw, "write order");
        chk(arf_wr_data == (64'hA5A5_0000_0000_0000 | 64'(nw) * 64'h1111), "write data");
        nw++;
      end
      if (pc_wr_en) chk(pc_wr == anim_pc && nw == NREG, "pc write after registers");
      chk(anim_hold && busy, "hold during copy");
      cycles++;
      @(negedge clk);
    end
    cycles++;
    chk(nw == NREG, "all registers copied");
    chk(cycles == NREG + 3, $sformatf("length %0d", cycles));
    @(negedge clk);
    chk(!busy && !anim_hold && resyncs == 1, "back to idle");
    chk(!busy2 && rs2 == 0, "MIN_DISABLED=2 must not trigger on one disabled type");
    // two disabled types trigger the second instance
    dis_event = 3'b010; hint_dis = 3'b011;
    @(negedge clk); dis_event = '0;
    chk(busy2 && sq2, "MIN_DISABLED=2 triggers on two");
    // force
    repeat (80) @(negedge clk);
    force_resync = 1; @(negedge clk); force_resync = 0;
    chk(squash, "forced resync");
    repeat (80) @(negedge clk);
    chk(resyncs == 3 && rs2 == 1, "resync counts (event, second event, forced)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

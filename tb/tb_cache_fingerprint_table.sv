// tb_cache_fingerprint_table: random accesses (up to 6 per cycle) and random
// interval ends; every snapshot is compared entry by entry with counts kept
// by the testbench, and `clear` is checked to empty the table.
module tb_cache_fingerprint_table;
  localparam int E = 32, N = 6, CW = 16, W = 32;
  logic clk = 0, rst_n = 0, clear = 0, snap = 0;
  logic [N-1:0] inc_valid;
  logic [N-1:0][W-1:0] inc_addr;
  logic [E-1:0][CW-1:0] snap_cnt;
  int checks = 0, failures = 0;
  int model [E];
  int expect_snap [E];

  cache_fingerprint_table #(.ENTRIES(E), .NIN(N), .CNT_W(CW), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    inc_valid = '0; inc_addr = '0;
    for (int e = 0; e < E; e++) model[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 30; iv++) begin
      int len;
      len = 20 + $urandom % 100;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        snap = (c == len - 1);
        clear = 0;
        if (snap) for (int e = 0; e < E; e++) begin expect_snap[e] = model[e]; model[e] = 0; end
        for (int i = 0; i < N; i++) begin
          inc_valid[i] = $urandom % 2;
          inc_addr[i]  = $urandom;
          if (inc_valid[i]) model[inc_addr[i] % E]++;
        end
        @(posedge clk);
      end
      @(negedge clk);
      snap = 0; inc_valid = '0;
      for (int e = 0; e < E; e++) begin
        checks++;
        if (int'(snap_cnt[e]) != expect_snap[e]) begin
          failures++;
          if (failures < 10) $display("interval %0d entry %0d got %0d expected %0d", iv, e, snap_cnt[e], expect_snap[e]);
        end
      end
    end
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; snap = 1; @(negedge clk); snap = 0;
    for (int e = 0; e < E; e++) begin checks++; if (snap_cnt[e] != 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

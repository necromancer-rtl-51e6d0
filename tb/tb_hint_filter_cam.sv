// tb_hint_filter_cam: random commit groups of up to 6 block addresses drawn
// from a small set, so hits are frequent. A reference model (list of the last
// two kept addresses, FIFO replacement, checked in program order) predicts
// `keep` for every slot; `update` and `flush` are exercised at random.
module tb_hint_filter_cam;
  localparam int E = 2, N = 6, W = 32;
  logic clk = 0, rst_n = 0, flush = 0, update = 0;
  logic [N-1:0] in_valid;
  logic [N-1:0][W-1:0] in_addr;
  logic [N-1:0] keep;
  int checks = 0, failures = 0, hits = 0;
  logic [W-1:0] m_tag [E];
  logic         m_vld [E];
  int           m_ptr;

  hint_filter_cam #(.ENTRIES(E), .NIN(N), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] exp_keep;
    logic [W-1:0] t_tag [E];
    logic         t_vld [E];
    int t_ptr;
    bit hit;
    in_valid = '0; in_addr = '0;
    for (int e = 0; e < E; e++) begin m_vld[e] = 0; m_tag[e] = 0; end
    m_ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom % 4) != 0;
        in_addr[i]  = W'($urandom % 5);
      end
      update = ($urandom % 8) != 0;
      flush  = ($urandom % 97) == 0;
      // model
      t_tag = m_tag; t_vld = m_vld; t_ptr = m_ptr;
      for (int i = 0; i < N; i++) begin
        hit = 0;
        for (int e = 0; e < E; e++) if (t_vld[e] && t_tag[e] == in_addr[i]) hit = 1;
        exp_keep[i] = in_valid[i] && !hit;
        if (in_valid[i] && hit) hits++;
        if (exp_keep[i]) begin t_tag[t_ptr] = in_addr[i]; t_vld[t_ptr] = 1; t_ptr = (t_ptr + 1) % E; end
      end
      #1;
      checks++;
      if (keep !== exp_keep) begin
        failures++;
        if (failures < 10) $display("cycle %0d keep %b expected %b", cyc, keep, exp_keep);
      end
      @(posedge clk);
      if (flush) begin for (int e = 0; e < E; e++) m_vld[e] = 0; m_ptr = 0; end
      else if (update) begin m_tag = t_tag; m_vld = t_vld; m_ptr = t_ptr; end
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_undead_mem_filter: dirty write-backs are counted and never reach the
// L2; refill requests pass to the L2; an L2 hit returns its data, an L2 miss
// returns a zero line one cycle after the L2 reply, and the later memory
// reply for that id is dropped and counted (but a memory reply for an id
// that was not zero-filled is not).
// A second, random phase (2000 cycles) drives all inputs at once and compares
// every output with a reference model kept in the testbench: the set of
// zero-filled ids, both counters and the registered reply.
module tb_undead_mem_filter;
  localparam int IDW = 3, AW = 58, LW = 512;
  logic clk = 0, rst_n = 0;
  logic wb_valid = 0, fill_req_valid = 0, l2_req_ready = 1, l2_resp_valid = 0, l2_resp_hit = 0, mem_resp_valid = 0;
  logic [AW-1:0] wb_addr = '0, fill_req_addr = '0, l2_req_addr;
  logic [LW-1:0] wb_data = '0, l2_resp_data = '0, fill_resp_data;
  logic [IDW-1:0] fill_req_id = '0, l2_req_id, l2_resp_id = '0, mem_resp_id = '0, fill_resp_id;
  logic fill_req_ready, l2_req_valid, fill_resp_valid, fill_resp_zero;
  logic [31:0] wb_dropped, mem_dropped;
  int checks = 0, failures = 0;

  undead_mem_filter #(.IDW(IDW), .AW(AW), .LINE_W(LW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    wb_valid = 1; wb_addr = 58'h123; wb_data = {16{32'hDEADBEEF}};
    fill_req_valid = 1; fill_req_addr = 58'h456; fill_req_id = 3'd2;
    #1;
    chk(l2_req_valid && l2_req_addr == 58'h456 && l2_req_id == 3'd2 && fill_req_ready, "refill passes");
    @(negedge clk); wb_valid = 0; fill_req_valid = 0;
    chk(wb_dropped == 1, "write-back dropped");
    // L2 hit
    l2_resp_valid = 1; l2_resp_id = 3'd2; l2_resp_hit = 1; l2_resp_data = {16{32'h01234567}};
    @(negedge clk); l2_resp_valid = 0;
    chk(fill_resp_valid && fill_resp_id == 3'd2 && !fill_resp_zero && fill_resp_data == {16{32'h01234567}}, "hit data");
    // L2 miss
    l2_resp_valid = 1; l2_resp_id = 3'd5; l2_resp_hit = 0; l2_resp_data = {16{32'hFFFFFFFF}};
    @(negedge clk); l2_resp_valid = 0;
    chk(fill_resp_valid && fill_resp_id == 3'd5 && fill_resp_zero && fill_resp_data == '0, "miss returns zero");
    @(negedge clk);
    chk(!fill_resp_valid, "single reply");
    mem_resp_valid = 1; mem_resp_id = 3'd5;
    @(negedge clk);
    chk(mem_dropped == 1 && !fill_resp_valid, "memory reply dropped");
    mem_resp_id = 3'd1;
    @(negedge clk); mem_resp_valid = 0;
    chk(mem_dropped == 1, "unrelated memory reply not counted");
    // random phase against a reference model
    begin
      bit [7:0] zset;
      int ewb, emem;
      bit ev, ez;
      logic [IDW-1:0] eid;
      logic [LW-1:0] edata;
      ewb = int'(wb_dropped); emem = int'(mem_dropped);
      @(negedge clk);
      zset = '0;
      for (int c = 0; c < 2000; c++) begin
        wb_valid       = ($urandom % 4) == 0;
        wb_addr        = AW'($urandom);
        fill_req_valid = ($urandom % 3) == 0;
        fill_req_addr  = {26'd0, $urandom};
        fill_req_id    = IDW'($urandom);
        l2_req_ready   = ($urandom % 4) != 0;
        l2_resp_valid  = ($urandom % 3) == 0;
        l2_resp_id     = IDW'($urandom);
        l2_resp_hit    = ($urandom % 2) == 0;
        l2_resp_data   = {16{$urandom}};
        mem_resp_valid = ($urandom % 3) == 0;
        mem_resp_id    = IDW'($urandom);
        #1;
        chk(l2_req_valid == fill_req_valid && l2_req_addr == fill_req_addr && l2_req_id == fill_req_id
            && fill_req_ready == l2_req_ready, "random: request path");
        // reference update for this cycle
        if (wb_valid) ewb++;
        if (mem_resp_valid && zset[mem_resp_id]) begin zset[mem_resp_id] = 1'b0; emem++; end
        ev = l2_resp_valid; eid = l2_resp_id; ez = !l2_resp_hit;
        edata = l2_resp_hit ? l2_resp_data : '0;
        if (l2_resp_valid && !l2_resp_hit) zset[l2_resp_id] = 1'b1;
        @(negedge clk);
        chk(fill_resp_valid == ev, "random: reply valid");
        if (ev) chk(fill_resp_id == eid && fill_resp_zero == ez && fill_resp_data == edata, "random: reply");
        chk(int'(wb_dropped) == ewb && int'(mem_dropped) == emem, "random: counters");
      end
      wb_valid = 0; fill_req_valid = 0; l2_resp_valid = 0; mem_resp_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nm_comm_queue: packets carry a serial number in their age field. Phase 1
// pushes one packet into an empty queue and checks it appears exactly
// QDELAY (15) cycles later. Phase 2 pushes until full (32 entries, push_ready
// must drop), then drains. Phase 3 runs random push/pop; order, the minimum
// delay and the occupancy count are checked against a model. Finally flush.
module tb_nm_comm_queue;
  import nm_pkg::*;
  localparam int DEPTH = 32, QD = 15;
  logic clk = 0, rst_n = 0, flush = 0, push_valid = 0, pop_ready = 0;
  logic push_ready, pop_valid;
  nm_packet_t push_pkt, pop_pkt;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, cyc = 0, full_seen = 0;
  int mq_id [$];
  int mq_t  [$];
  int next_id = 0;

  nm_comm_queue #(.DEPTH(DEPTH), .QDELAY(QD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("cycle %0d: %s", cyc, msg); end
  endtask

  // One clock with the given push/pop requests; model updated on handshakes.
  task automatic step(input bit pv, input bit pr);
    @(negedge clk);
    push_valid = pv; pop_ready = pr;
    push_pkt = '0; push_pkt.age = AGE_W'(next_id);
    push_pkt.slot[0].pay = PAY_W'(next_id * 7);
    #1;
    chk(int'(count) == mq_id.size(), "count");
    chk(push_ready == (mq_id.size() < DEPTH), "push_ready");
    if (mq_id.size() > 0) chk(pop_valid == (cyc - mq_t[0] >= QD), "pop_valid timing");
    else chk(!pop_valid, "pop_valid on empty");
    if (pop_valid) chk(int'(pop_pkt.age) == mq_id[0] && int'(pop_pkt.slot[0].pay) == mq_id[0] * 7, "order");
    @(posedge clk);
    if (pop_valid && pop_ready) begin void'(mq_id.pop_front()); void'(mq_t.pop_front()); end
    if (pv && push_ready) begin mq_id.push_back(next_id); mq_t.push_back(cyc); next_id++; end
  endtask

  initial begin
    int t0;
    push_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: latency
    step(1, 0);
    t0 = cyc;
    while (!pop_valid) begin step(0, 0); end
    chk(cyc - t0 == QD - 1 || cyc - t0 == QD, "latency");
    $display("head visible %0d cycles after the push", cyc - t0 + 1);
    step(0, 1);
    // Phase 2: fill
    for (int i = 0; i < DEPTH + 4; i++) begin step(1, 0); if (!push_ready) full_seen++; end
    chk(full_seen > 0, "queue never full");
    while (mq_id.size() > 0) step(0, 1);
    // Phase 3: random
    for (int i = 0; i < 3000; i++) step(($urandom % 3) != 0, ($urandom % 2) == 0);
    // flush
    @(negedge clk); flush = 1; push_valid = 0; @(negedge clk); flush = 0;
    mq_id.delete(); mq_t.delete();
    #1 chk(count == 0 && !pop_valid, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

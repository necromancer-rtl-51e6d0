// tb_hint_type_buffer: random bursts of up to 4 entries per cycle (never more
// than `free`) against a queue model; output order, ages and payloads and the
// free count are checked each cycle, with random consumer back-pressure.
module tb_hint_type_buffer;
  import nm_pkg::*;
  localparam int D = 8, N = 4;
  logic clk = 0, rst_n = 0, flush = 0, out_ready = 0;
  logic [N-1:0] in_valid;
  logic [AGE_W-1:0] in_age, out_age;
  logic [N-1:0][PAY_W-1:0] in_pay;
  logic [$clog2(D+1)-1:0] free;
  logic out_valid;
  logic [PAY_W-1:0] out_pay;
  int checks = 0, failures = 0, seq = 0;
  logic [63:0] mq [$];

  hint_type_buffer #(.DEPTH(D), .NIN(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = '0; in_age = '0; in_pay = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int n;
      @(negedge clk);
      checks++; if (int'(free) != D - mq.size()) failures++;
      n = $urandom % (N + 1);
      if (n > int'(free)) n = int'(free);
      in_valid = '0;
      in_age = AGE_W'(c);
      for (int i = 0; i < n; i++) begin in_valid[i] = 1; in_pay[i] = PAY_W'(seq + i); end
      out_ready = $urandom % 2;
      #1;
      checks++;
      if (out_valid != (mq.size() > 0)) failures++;
      if (out_valid) begin
        checks++;
        if ({out_age, out_pay} != mq[0]) begin
          failures++;
          if (failures < 10) $display("cycle %0d got %h expected %h", c, {out_age, out_pay}, mq[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(mq.pop_front());
      for (int i = 0; i < n; i++) mq.push_back({AGE_W'(c), PAY_W'(seq + i)});
      seq += n;
    end
    @(negedge clk); in_valid = '0; flush = 1; @(negedge clk); flush = 0; #1;
    checks++; if (out_valid || free != D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

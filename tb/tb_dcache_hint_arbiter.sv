// tb_dcache_hint_arbiter: every combination of port use and hint request;
// the prefetch must go to the lowest free port, never to a busy one, and the
// hint must be accepted exactly when a port is free.
module tb_dcache_hint_arbiter;
  logic [1:0] core_busy, port_pf_valid;
  logic hint_valid, hint_ready;
  logic [31:0] hint_addr, port_pf_addr;
  int checks = 0, failures = 0;

  dcache_hint_arbiter #(.PORTS(2), .W(32)) dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      logic [1:0] exp_pf;
      core_busy  = k[1:0];
      hint_valid = k[2];
      hint_addr  = 32'h1000 + k;
      #1;
      exp_pf = !core_busy[0] ? {1'b0, hint_valid} : (!core_busy[1] ? {hint_valid, 1'b0} : 2'b00);
      checks++; if (port_pf_valid !== exp_pf) failures++;
      checks++; if (hint_ready !== (core_busy != 2'b11)) failures++;
      checks++; if (port_pf_addr !== hint_addr) failures++;
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

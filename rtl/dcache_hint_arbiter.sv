// dcache_hint_arbiter: applies D-cache prefetch hints on idle D-cache ports.
//
// The animator core's L1 D-cache keeps its PORTS (two) ports; no port is added
// for hints because both are rarely busy at once. A hint is issued on the
// lowest-numbered port that the core does not use in this cycle; the core's
// own accesses always win. hint_valid/hint_ready is a valid/ready handshake,
// and port_pf_valid[p] marks a prefetch on port p in the same cycle (the
// address is port_pf_addr). Combinational; the choice of port among free ones
// is this implementation's.
module dcache_hint_arbiter #(
  parameter int unsigned PORTS = 2,
  parameter int unsigned W     = 32
) (
  input  logic [PORTS-1:0] core_busy,
  input  logic             hint_valid,
  input  logic [W-1:0]     hint_addr,
  output logic             hint_ready,
  output logic [PORTS-1:0] port_pf_valid,
  output logic [W-1:0]     port_pf_addr
);
  always_comb begin
    logic found;
    found         = 1'b0;
    port_pf_valid = '0;
    for (int p = 0; p < PORTS; p++)
      if (!core_busy[p] && !found) begin
        found            = 1'b1;
        port_pf_valid[p] = hint_valid;
      end
    port_pf_addr = hint_addr;
  end

  // Ready depends on port use only, never on hint_valid.
  assign hint_ready = (core_busy != '1);

  a_core_first: assert final ((port_pf_valid & core_busy) == '0);
endmodule

// hint_filter_cam: small content-addressable memory that suppresses cache
// hints whose block address was sent recently.
//
// The hint gathering unit keeps one such CAM for I-cache hints and one for
// D-cache hints; each remembers the last ENTRIES block addresses sent (two in
// the evaluated configuration). Each cycle up to NIN candidate addresses of one
// commit group are checked in program order: a candidate is kept when it
// matches no entry and no earlier kept candidate of the same group. Kept
// addresses enter the CAM first-in first-out (oldest entry replaced) when
// `update` is high. `keep` is combinational from the inputs; the CAM contents
// change on the clock edge. `flush` empties it (resynchronization).
// The FIFO replacement and the in-group check order are implementation
// choices.
module hint_filter_cam #(
  parameter int unsigned ENTRIES = 2,
  parameter int unsigned NIN     = 6,
  parameter int unsigned W       = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  input  logic [NIN-1:0]       in_valid,
  input  logic [NIN-1:0][W-1:0] in_addr,
  output logic [NIN-1:0]       keep,
  input  logic                 update
);
  localparam int unsigned PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0][W-1:0] tag_q, tag_d;
  logic [ENTRIES-1:0]        vld_q, vld_d;
  logic [PW-1:0]             ptr_q, ptr_d;

  always_comb begin
    logic hit;
    tag_d = tag_q;
    vld_d = vld_q;
    ptr_d = ptr_q;
    keep  = '0;
    for (int i = 0; i < NIN; i++) begin
      hit = 1'b0;
      for (int e = 0; e < ENTRIES; e++)
        if (vld_d[e] && tag_d[e] == in_addr[i]) hit = 1'b1;
      if (in_valid[i] && !hit) begin
        keep[i]      = 1'b1;
        tag_d[ptr_d] = in_addr[i];
        vld_d[ptr_d] = 1'b1;
        ptr_d        = (ptr_d == PW'(ENTRIES - 1)) ? '0 : ptr_d + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q <= '0;
      vld_q <= '0;
      ptr_q <= '0;
    end else if (flush) begin
      vld_q <= '0;
      ptr_q <= '0;
    end else if (update) begin
      tag_q <= tag_d;
      vld_q <= vld_d;
      ptr_q <= ptr_d;
    end
  end

endmodule

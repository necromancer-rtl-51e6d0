// undead_mem_filter: keeps the undead core from corrupting memory and from
// waiting on main memory.
//
// Sits between the undead core's L1 D-cache and the shared L2.
//  * Dirty victims (wb_*) are never written to the L2: the line is dropped,
//    so a faulty core cannot change the memory state the animator sees.
//    `wb_dropped` counts them.
//  * Refill requests (fill_req_*) go to the L2 unchanged, so the undead core
//    still warms the shared L2 for the animator.
//  * An L2 reply (l2_resp_*) that hits returns its line to the L1. A miss
//    returns an all-zero line to the L1 at once, and the request id is marked;
//    the line that main memory later returns for that id (mem_resp_*) fills
//    only the L2 and is not passed to the undead core (`mem_dropped` counts).
// Ids are IDW bits; one outstanding miss per id. Replies to the L1 are
// registered (one cycle after the L2 reply). Reply formats and the id scheme
// are this implementation's choices.
module undead_mem_filter #(
  parameter int unsigned IDW    = 3,
  parameter int unsigned AW     = 58,
  parameter int unsigned LINE_W = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wb_valid,
  input  logic [AW-1:0]     wb_addr,
  input  logic [LINE_W-1:0] wb_data,
  output logic [31:0]       wb_dropped,
  input  logic              fill_req_valid,
  input  logic [AW-1:0]     fill_req_addr,
  input  logic [IDW-1:0]    fill_req_id,
  output logic              fill_req_ready,
  output logic              l2_req_valid,
  output logic [AW-1:0]     l2_req_addr,
  output logic [IDW-1:0]    l2_req_id,
  input  logic              l2_req_ready,
  input  logic              l2_resp_valid,
  input  logic [IDW-1:0]    l2_resp_id,
  input  logic              l2_resp_hit,
  input  logic [LINE_W-1:0] l2_resp_data,
  input  logic              mem_resp_valid,
  input  logic [IDW-1:0]    mem_resp_id,
  output logic              fill_resp_valid,
  output logic [IDW-1:0]    fill_resp_id,
  output logic [LINE_W-1:0] fill_resp_data,
  output logic              fill_resp_zero,
  output logic [31:0]       mem_dropped
);
  logic [(1<<IDW)-1:0] zeroed_q;

  assign l2_req_valid   = fill_req_valid;
  assign l2_req_addr    = fill_req_addr;
  assign l2_req_id      = fill_req_id;
  assign fill_req_ready = l2_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zeroed_q        <= '0;
      wb_dropped      <= '0;
      mem_dropped     <= '0;
      fill_resp_valid <= 1'b0;
      fill_resp_id    <= '0;
      fill_resp_data  <= '0;
      fill_resp_zero  <= 1'b0;
    end else begin
      fill_resp_valid <= 1'b0;
      if (wb_valid) wb_dropped <= wb_dropped + 1'b1;
      if (mem_resp_valid && zeroed_q[mem_resp_id]) begin
        zeroed_q[mem_resp_id] <= 1'b0;
        mem_dropped           <= mem_dropped + 1'b1;
      end
      if (l2_resp_valid) begin
        fill_resp_valid <= 1'b1;
        fill_resp_id    <= l2_resp_id;
        fill_resp_zero  <= !l2_resp_hit;
        fill_resp_data  <= l2_resp_hit ? l2_resp_data : '0;
        if (!l2_resp_hit) zeroed_q[l2_resp_id] <= 1'b1;
      end
    end
  end

  // The write-back path is cut on purpose: the victim's address and data
  // are never forwarded.
  logic unused_wb;
  assign unused_wb = ^{wb_addr, wb_data};

endmodule

// nm_comm_queue: the single aggregated hint queue between the cores.
//
// A FIFO of DEPTH packets (nm_packet_t) from the undead core's hint gathering
// unit to the animator core's hint distribution unit. One packet can enter
// and one can leave per cycle. The wires between the two cores are modelled
// as a fixed delay: a packet becomes visible at the head QDELAY cycles after
// it was pushed (15 cycles, the same as an L2 access). Each entry stores the
// cycle it was pushed; a free-running cycle counter gives its age.
// push_ready is low when the queue is full, which stalls the undead core.
// `flush` empties the queue (resynchronization). `count` is the occupancy.
// The depth is this implementation's choice.
module nm_comm_queue
  import nm_pkg::*;
#(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned QDELAY = 15
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push_valid,
  output logic                       push_ready,
  input  nm_packet_t                 push_pkt,
  output logic                       pop_valid,
  input  logic                       pop_ready,
  output nm_packet_t                 pop_pkt,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned TW = 32;  // wraps only after 2^32 cycles at the head

  nm_packet_t         mem [DEPTH];
  logic [TW-1:0]      ts  [DEPTH];
  logic [AW-1:0]      rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic [TW-1:0]      now_q, waited;
  logic               do_push, do_pop;

  assign waited     = now_q - ts[rd_q];
  assign push_ready = (cnt_q != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop_valid  = (cnt_q != '0) && (waited >= TW'(QDELAY));
  assign pop_pkt    = mem[rd_q];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign count      = cnt_q;

  always_ff @(posedge clk) begin
    if (do_push && !flush) begin
      mem[wr_q] <= push_pkt;
      ts[wr_q]  <= now_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      now_q <= '0;
    end else begin
      now_q <= now_q + 1'b1;
      if (flush) begin
        rd_q  <= '0;
        wr_q  <= '0;
        cnt_q <= '0;
      end else begin
        if (do_push) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
        if (do_pop)  rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
        cnt_q <= cnt_q + ($bits(cnt_q))'(do_push) - ($bits(cnt_q))'(do_pop);
      end
    end
  end

  // A packet never leaves before it has crossed the link.
  property p_delay;
    @(posedge clk) disable iff (!rst_n) do_pop |-> waited >= TW'(QDELAY);
  endproperty
  a_delay: assert property (p_delay);

endmodule

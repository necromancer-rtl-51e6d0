// hint_type_buffer: small per-type buffer of the hint distribution unit.
//
// A packet can carry several hints of one type under one age tag, while the
// animator applies at most one hint of each type per cycle and each type has
// its own release window. This FIFO takes up to NIN entries per cycle (the
// valid ones of in_valid, packed in order, all with age `in_age`) and
// presents one entry, with its age, at the output. out_valid/out_ready is a
// valid/ready handshake; the consumer decides when an entry may be released.
// `free` is the number of empty entries; the writer must not offer more.
// `flush` empties the buffer. Depth is this implementation's choice.
module hint_type_buffer
  import nm_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NIN   = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         flush,
  input  logic [NIN-1:0]               in_valid,
  input  logic [AGE_W-1:0]             in_age,
  input  logic [NIN-1:0][PAY_W-1:0]    in_pay,
  output logic [$clog2(DEPTH+1)-1:0]   free,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [AGE_W-1:0]             out_age,
  output logic [PAY_W-1:0]             out_pay
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [AGE_W-1:0] age_m [DEPTH];
  logic [PAY_W-1:0] pay_m [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    cnt_q, nin;
  logic             pop;

  assign pop = out_valid && out_ready;

  always_comb begin
    nin = '0;
    for (int i = 0; i < NIN; i++) if (in_valid[i]) nin = nin + 1'b1;
  end

  assign free      = CW'(DEPTH) - cnt_q;
  assign out_valid = (cnt_q != '0);
  assign out_age   = age_m[rd_q];
  assign out_pay   = pay_m[rd_q];

  always_ff @(posedge clk) begin
    logic [AW-1:0] w;
    w = wr_q;
    if (!flush)
      for (int i = 0; i < NIN; i++)
        if (in_valid[i]) begin
          age_m[w] <= in_age;
          pay_m[w] <= in_pay[i];
          w = (w == AW'(DEPTH - 1)) ? '0 : w + 1'b1;
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      wr_q  <= AW'((int'(wr_q) + int'(nin)) % DEPTH);
      if (pop) rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + nin - CW'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) nin <= free);

endmodule

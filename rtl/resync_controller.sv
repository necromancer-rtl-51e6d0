// resync_controller: brings the undead core back to a valid architectural
// state.
//
// Policy: a resynchronization starts when a hint type becomes disabled
// (dis_event) while at least MIN_DISABLED types are disabled; MIN_DISABLED = 1
// resynchronizes on the first disabled hint. `force_resync` starts one
// directly (for example at the start of a coupled execution).
//
// Sequence (one state per step):
//   SQUASH : one cycle of `squash` - the undead core squashes its pipeline,
//            resets its rename table and invalidates its D-cache, and the hint
//            queue and buffers are emptied;
//   COPY   : NREG cycles; register i of the animator (arf_rd_idx, read
//            combinationally as arf_rd_data) is written to register i of the
//            undead core (arf_wr_*);
//   PC     : the animator PC is written to the undead core (pc_wr_*);
//   DONE   : one cycle of `done` - committed counts are aligned and hint
//            disabling restarts.
// `anim_hold` and `undead_hold` are high from SQUASH to DONE so that both cores
// stand still while the state is copied. With 64 registers a
// resynchronization takes NREG + 3 = 67 cycles, on the order of the 100 cycles
// expected for a core-to-core state copy. `resyncs` counts them.
// The register-per-cycle copy and holding the animator are this
// implementation's choices. Register data, register index and PC pass
// straight from the animator's read side to the undead core's write side.
module resync_controller
  import nm_pkg::*;
#(
  parameter int unsigned NREG         = 64,
  parameter int unsigned MIN_DISABLED = 1,
  parameter int unsigned XLEN         = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2:0]               dis_event,
  input  logic [2:0]               hint_dis,
  input  logic                     force_resync,
  output logic                     busy,
  output logic                     anim_hold,
  output logic                     undead_hold,
  output logic                     squash,
  output logic [$clog2(NREG)-1:0]  arf_rd_idx,
  input  logic [XLEN-1:0]          arf_rd_data,
  output logic                     arf_wr_en,
  output logic [$clog2(NREG)-1:0]  arf_wr_idx,
  output logic [XLEN-1:0]          arf_wr_data,
  input  logic [VA_W-1:0]          anim_pc,
  output logic                     pc_wr_en,
  output logic [VA_W-1:0]          pc_wr,
  output logic                     done,
  output logic [31:0]              resyncs
);
  typedef enum logic [2:0] {S_IDLE, S_SQUASH, S_COPY, S_PC, S_DONE} state_e;

  localparam int unsigned RW = $clog2(NREG);

  state_e        st_q;
  logic [RW-1:0] r_q;
  logic          trigger;
  logic [1:0]    ndis;

  always_comb begin
    ndis    = 2'(hint_dis[0]) + 2'(hint_dis[1]) + 2'(hint_dis[2]);
    trigger = force_resync || ((dis_event != '0) && (int'(ndis) >= int'(MIN_DISABLED)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      r_q     <= '0;
      resyncs <= '0;
    end else begin
      unique case (st_q)
        S_IDLE:   if (trigger) st_q <= S_SQUASH;
        S_SQUASH: begin
          st_q <= S_COPY;
          r_q  <= '0;
        end
        S_COPY: begin
          r_q <= r_q + 1'b1;
          if (r_q == RW'(NREG - 1)) st_q <= S_PC;
        end
        S_PC:     st_q <= S_DONE;
        S_DONE: begin
          st_q    <= S_IDLE;
          resyncs <= resyncs + 1'b1;
        end
        default:  st_q <= S_IDLE;
      endcase
    end
  end

  assign busy        = (st_q != S_IDLE);
  assign anim_hold   = busy;
  assign undead_hold = busy;
  assign squash      = (st_q == S_SQUASH);
  assign arf_rd_idx  = r_q;
  assign arf_wr_en   = (st_q == S_COPY);
  assign arf_wr_idx  = r_q;
  assign arf_wr_data = arf_rd_data;
  assign pc_wr_en    = (st_q == S_PC);
  assign pc_wr       = anim_pc;
  assign done        = (st_q == S_DONE);

endmodule

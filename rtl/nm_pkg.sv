// nm_pkg: types and constants shared by the coupled-core (undead/animator)
// hint logic.
//
// A hint travels from the undead core to the animator core inside a queue
// packet. A packet carries one age tag (the undead core's committed
// instruction count when the hints were produced) and NSLOT slots; each slot
// holds a 3-bit type tag and a 32-bit payload. The 3-bit type tag and the age
// tag follow the coupled-core scheme; the slot count, payload width, type
// encoding and packet layout are choices of this implementation.
//
// Payload formats:
//   D-cache / I-cache hint : block address (byte address >> BLK_OFF)
//   branch hint            : {taken, PC[32:2]} (low PC bits index the NM BHT)
//   fingerprint            : {entry index[7:0], count[23:0]}
package nm_pkg;

  localparam int unsigned AGE_W   = 32;  // committed-instruction counter / age tag
  localparam int unsigned PAY_W   = 32;  // payload bits per slot
  localparam int unsigned NSLOT   = 4;   // hint slots per packet
  localparam int unsigned VA_W    = 64;  // Alpha virtual address width
  localparam int unsigned BLK_OFF = 6;   // 64-byte cache blocks

  // Hint kinds, used as indices of the enable/disable vectors.
  localparam int unsigned HK_D  = 0;
  localparam int unsigned HK_I  = 1;
  localparam int unsigned HK_BP = 2;

  typedef enum logic [2:0] {
    T_NONE  = 3'd0,
    T_DHINT = 3'd1,  // data-cache prefetch hint
    T_IHINT = 3'd2,  // instruction-cache prefetch hint
    T_BHINT = 3'd3,  // branch-predictor update hint
    T_DFP   = 3'd4,  // D-cache fingerprint entry
    T_IFP   = 3'd5   // I-cache fingerprint entry
  } hint_type_e;

  typedef struct packed {
    logic             valid;
    hint_type_e       typ;
    logic [PAY_W-1:0] pay;
  } hint_slot_t;

  typedef struct packed {
    logic [AGE_W-1:0]             age;
    hint_slot_t [NSLOT-1:0]       slot;
  } nm_packet_t;

  // One committed instruction of the undead or animator core.
  typedef struct packed {
    logic            valid;
    logic [VA_W-1:0] pc;
    logic            is_mem;   // committed load or store
    logic [VA_W-1:0] addr;     // its effective address
    logic            is_br;    // committed conditional branch
    logic            taken;    // its outcome
  } commit_t;

  // Block address of a byte address, cut to the payload width.
  function automatic logic [PAY_W-1:0] blk_addr(input logic [VA_W-1:0] a);
    return a[BLK_OFF +: PAY_W];
  endfunction

  // "a is not later than b" for wrapping counters.
  function automatic logic age_le(input logic [AGE_W-1:0] a, input logic [AGE_W-1:0] b);
    logic [AGE_W-1:0] d;
    d = b - a;
    return !d[AGE_W-1];
  endfunction

endpackage

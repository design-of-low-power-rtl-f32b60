// Shared types and constants of the four-master reconfigurable AHB arbiter.
//
// The arbiter serves NUM_MASTERS = 4 bus masters (the AHB protocol allows up
// to 16; HMASTER keeps its full 4-bit width). ARBITRATION[1:0] selects one of
// four schemes with the encoding 00 High Priority, 01 Fair Chance,
// 10 Random Access, 11 Round Robin. The AHB transfer-response and burst
// encodings are those of the AMBA 2 AHB protocol. The controller state enum is
// one-hot, as the arbiter is a one-hot Moore machine.
package ahb_arb_pkg;

  localparam int unsigned NUM_MASTERS = 4;
  localparam int unsigned MIDX_W      = 4;   // width of HMASTER
  localparam int unsigned NUM_W       = 4;   // width of a random number per master

  typedef logic [NUM_MASTERS-1:0] req_vec_t;
  typedef logic [MIDX_W-1:0]      master_id_t;

  typedef enum logic [1:0] {
    ARB_HIGH_PRIORITY = 2'b00,
    ARB_FAIR_CHANCE   = 2'b01,
    ARB_RANDOM_ACCESS = 2'b10,
    ARB_ROUND_ROBIN   = 2'b11
  } arb_sel_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  // One-hot controller states.
  typedef enum logic [6:0] {
    ST_IDLE          = 7'b0000001,
    ST_ARBITRATION   = 7'b0000010,
    ST_HIGH_PRIORITY = 7'b0000100,
    ST_FAIR_CHANCE   = 7'b0001000,
    ST_RANDOM_ACCESS = 7'b0010000,
    ST_ROUND_ROBIN   = 7'b0100000,
    ST_HMASTER       = 7'b1000000
  } arb_state_e;

  // Number of beats of a burst, used as the round-robin time slot.
  // SINGLE and undefined-length INCR get a one-beat slot.
  function automatic logic [4:0] burst_slot(input logic [2:0] hburst);
    unique case (hburst)
      HBURST_WRAP4,  HBURST_INCR4:  return 5'd4;
      HBURST_WRAP8,  HBURST_INCR8:  return 5'd8;
      HBURST_WRAP16, HBURST_INCR16: return 5'd16;
      default:                      return 5'd1;
    endcase
  endfunction

  // Index of the set bit of a one-hot vector (0 for an all-zero vector).
  function automatic master_id_t onehot_to_id(input req_vec_t oh);
    master_id_t id;
    id = '0;
    for (int unsigned i = 0; i < NUM_MASTERS; i++)
      if (oh[i]) id = master_id_t'(i);
    return id;
  endfunction

endpackage

// Reconfigurable low-power AHB arbiter for four bus masters.
//
// One arbiter holds four arbitration schemes and lets the system pick one
// at run time with ARBITRATION[1:0]:
//   00 High Priority  fixed order, master 0 highest, master 3 lowest
//   01 Fair Chance    a token ring selects one of four rotated priority
//                     orders, so every master in turn is the top priority
//   10 Random Access  an LFSR gives each master a 4-bit number; the
//                     requesting master with the largest number wins
//   11 Round Robin    masters take turns, each for a slot as long as its
//                     burst (1, 4, 8 or 16 beats)
// The arbitration select controller (a one-hot Moore FSM) samples
// ARBITRATION, registers the chosen scheme's decision on HGRANT_x (or on
// DEFAULT when nobody requests), and drives HMASTER and HMASTLOCK. It also
// honours HLOCK, HREADY and SPLIT responses (HRESP, HSPLIT), and enables the
// clocked parts of the selected scheme only.
//
// Interface: AMBA 2 AHB arbiter signals for four masters, plus ENABLE, which
// lets the token ring, the LFSR and the slot timer advance, and
// ARBITRATION. Observation outputs show the token, the random numbers and
// the controller state. Timing: HGRANT_x three HCLK edges after a request
// seen in IDLE; HMASTER follows at the next edge with HREADY high.
// The four schemes, the select encoding and the DEFAULT output follow the
// published design; the observation outputs, DEFAULT_ID and the seed are
// this design's own.
module ahb_multi_arbiter
  import ahb_arb_pkg::*;
#(
  parameter master_id_t  DEFAULT_ID = master_id_t'(NUM_MASTERS),
  parameter logic [15:0] LFSR_SEED  = 16'hACE1
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             enable,
  input  logic [1:0]       arbitration,
  input  req_vec_t         hbusreq,    // HBUSREQ_3..HBUSREQ_0
  input  req_vec_t         hlock,      // HLOCK_3..HLOCK_0
  input  logic             hready,
  input  logic [1:0]       hresp,
  input  logic [2:0]       hburst,
  input  req_vec_t         hsplit,     // HSPLIT[3:0]
  output req_vec_t         hgrant,     // HGRANT_3..HGRANT_0
  output logic             default_grant,
  output master_id_t       hmaster,
  output logic             hmastlock,
  output req_vec_t         token,      // Fair-Chance token
  output logic [NUM_W-1:0] number [NUM_MASTERS],  // Random-Access numbers
  output arb_state_e       state
);

  req_vec_t req_m;
  req_vec_t hp_grant, fc_grant, ra_grant, rr_grant, rr_owner;
  logic     hp_dflt, fc_dflt, ra_dflt, rr_dflt;
  logic     en_fc, en_ra, en_rr, rr_load, rr_slot_over;

  ahb_high_priority u_high_priority (
    .req   (req_m),
    .grant (hp_grant),
    .dflt  (hp_dflt)
  );

  ahb_fair_chance u_fair_chance (
    .hclk    (hclk),
    .hresetn (hresetn),
    .enable  (en_fc),
    .req     (req_m),
    .grant   (fc_grant),
    .dflt    (fc_dflt),
    .token   (token)
  );

  ahb_random_access #(.SEED(LFSR_SEED)) u_random_access (
    .hclk    (hclk),
    .hresetn (hresetn),
    .enable  (en_ra),
    .req     (req_m),
    .grant   (ra_grant),
    .dflt    (ra_dflt),
    .num     (number)
  );

  ahb_round_robin u_round_robin (
    .hclk      (hclk),
    .hresetn   (hresetn),
    .enable    (en_rr),
    .load      (rr_load),
    .req       (req_m),
    .hburst    (hburst),
    .grant     (rr_grant),
    .dflt      (rr_dflt),
    .owner     (rr_owner),
    .slot_over (rr_slot_over)
  );

  ahb_arb_ctrl #(.DEFAULT_ID(DEFAULT_ID)) u_ctrl (
    .hclk         (hclk),
    .hresetn      (hresetn),
    .enable       (enable),
    .arbitration  (arb_sel_e'(arbitration)),
    .hbusreq      (hbusreq),
    .hlock        (hlock),
    .hready       (hready),
    .hresp        (hresp_e'(hresp)),
    .hsplit       (hsplit),
    .hp_grant     (hp_grant),
    .fc_grant     (fc_grant),
    .ra_grant     (ra_grant),
    .rr_grant     (rr_grant),
    .rr_slot_over (rr_slot_over),
    .req_masked   (req_m),
    .en_fc        (en_fc),
    .en_ra        (en_ra),
    .en_rr        (en_rr),
    .rr_load      (rr_load),
    .hgrant       (hgrant),
    .dflt         (default_grant),
    .hmaster      (hmaster),
    .hmastlock    (hmastlock),
    .state        (state)
  );

  // Each scheme reports "no requester" exactly when its grant is empty.
  a_dflt_consistent: assert property (@(posedge hclk) disable iff (!hresetn)
    (hp_dflt == (hp_grant == '0)) && (fc_dflt == (fc_grant == '0)) &&
    (ra_dflt == (ra_grant == '0)) && (rr_dflt == (rr_grant == '0)) &&
    $onehot(rr_owner));

endmodule

// Round-Robin arbitration scheme (ARBITRATION = 11).
//
// Masters get the bus in turn, each for a time slot whose length is the
// number of beats of the burst: 4, 8 or 16 for the 4-, 8- and 16-beat
// incrementing or wrapping bursts, and 1 for a single transfer or an
// undefined-length INCR burst. The parts are
//   - the point controller, which picks the next master: the current owner
//     keeps the bus while it requests and its slot lasts; otherwise the
//     search starts at the master after the owner and goes round the ring;
//   - the timer (ahb_rr_timer), loaded with the slot length (COUNT) at the
//     start of a turn and signalling the end of the slot (T_ENABLE);
//   - the demux, which steers the chosen master's request onto its own
//     grant line;
//   - the grant register, which holds the one-hot owner.
//
// Timing: GRANT is the combinational choice; when LOAD is high (the select
// controller is in its ROUND_ROBIN state) it is written into the grant
// register, and a new turn loads the timer from HBURST as seen at that edge.
// The timer counts HCLK edges with ENABLE high. SLOT_OVER is T_ENABLE.
// The four parts and the burst-sized slots follow the published design; the
// search order, the one-cycle slot for SINGLE/INCR and the exact meaning
// given to COUNT and T_ENABLE are choices made here.
module ahb_round_robin
  import ahb_arb_pkg::*;
(
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       enable,     // lets the timer count
  input  logic       load,       // take the choice into the grant register
  input  req_vec_t   req,        // HBUSREQ_x after SPLIT masking
  input  logic [2:0] hburst,     // HBURST of the transfer, sets the slot
  output req_vec_t   grant,      // choice of the point controller (one-hot)
  output logic       dflt,       // no master requests
  output req_vec_t   owner,      // grant register
  output logic       slot_over   // T_ENABLE of the timer
);

  // Reset value puts the owner at the last master so the first search starts
  // at master 0.
  localparam req_vec_t OWNER_RST = req_vec_t'(1) << (NUM_MASTERS - 1);

  master_id_t owner_id;
  master_id_t next_id;
  logic       found;
  logic       keep;
  logic       new_turn;

  assign owner_id = onehot_to_id(owner);
  assign keep     = |(owner & req) && !slot_over;

  // Point controller: first requester after the owner, round the ring. The
  // owner itself is the last candidate, so a lone requester is granted again.
  always_comb begin
    master_id_t idx;
    idx     = owner_id;
    next_id = owner_id;
    found   = 1'b0;
    for (int unsigned k = 1; k <= NUM_MASTERS; k++) begin
      idx = master_id_t'((int'(owner_id) + k) % NUM_MASTERS);
      if (!found && req[idx[$clog2(NUM_MASTERS)-1:0]]) begin
        next_id = idx;
        found   = 1'b1;
      end
    end
  end

  // Demux: steer the chosen master onto its grant line.
  always_comb begin
    grant = '0;
    if (keep)       grant = owner;
    else if (found) grant = req_vec_t'(1) << next_id;
  end

  assign dflt     = ~|req;
  assign new_turn = load && found && !keep;

  // Grant register.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)      owner <= OWNER_RST;
    else if (new_turn) owner <= grant;
  end

  ahb_rr_timer u_timer (
    .hclk     (hclk),
    .hresetn  (hresetn),
    .enable   (enable),
    .load     (new_turn),
    .count    (burst_slot(hburst)),
    .t_enable (slot_over)
  );

  a_owner_onehot: assert property (@(posedge hclk) disable iff (!hresetn) $onehot(owner));

endmodule
